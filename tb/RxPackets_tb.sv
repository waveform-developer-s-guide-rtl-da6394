// RxPackets_tb: two instances (header lengths 26 and 5) receive packets made
// of random bytes, with random gaps in DataValid and random idle time between
// packets (Enable low). The monitor checks that exactly the bytes after the
// header come out, in order, one clock after they went in.
module RxPackets_tb;
  logic Clk = 0, Reset = 1, Enable = 0, DataValid = 0;
  logic [7:0] DataIn = 0;
  logic [7:0] DataOutA, DataOutB;
  logic ValidA, ValidB, SmA, SmB;
  int checks = 0, failures = 0;

  RxPackets dutA (.Clk, .Reset, .Enable, .DataIn, .DataValid, .DataOut(DataOutA), .DataOutValid(ValidA), .SMFailure(SmA));
  RxPackets #(.HeaderLen(5)) dutB (.Clk, .Reset, .Enable, .DataIn, .DataValid, .DataOut(DataOutB), .DataOutValid(ValidB), .SMFailure(SmB));
  always #5 Clk = ~Clk;

  logic [7:0] qa [$], qb [$];
  logic [7:0] ea, eb;

  always @(posedge Clk) if (!Reset) begin
    if (ValidA) begin
      checks++;
      if (qa.size() == 0) begin failures++; $display("FAIL A extra byte"); end
      else begin ea = qa.pop_front(); if (ea !== DataOutA) begin failures++; $display("FAIL A %h exp %h", DataOutA, ea); end end
    end
    if (ValidB) begin
      checks++;
      if (qb.size() == 0) begin failures++; $display("FAIL B extra byte"); end
      else begin eb = qb.pop_front(); if (eb !== DataOutB) begin failures++; $display("FAIL B %h exp %h", DataOutB, eb); end end
    end
  end

  task automatic packet(input int len, input bit gaps);
    for (int i = 0; i < len; i++) begin
      @(negedge Clk);
      Enable = 1;
      while (gaps && $urandom_range(3) == 0) begin
        DataValid = 0; DataIn = 8'($urandom);
        @(negedge Clk);
      end
      DataValid = 1; DataIn = 8'($urandom);
      if (i >= 26) qa.push_back(DataIn);
      if (i >= 5) qb.push_back(DataIn);
    end
    @(negedge Clk) begin DataValid = 0; Enable = 0; end
    repeat ($urandom_range(3)) @(negedge Clk);
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    Reset <= 0;
    for (int k = 0; k < 40; k++) packet($urandom_range(60, 3), k[0]);
    repeat (3) @(negedge Clk);
    checks += 2;
    if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("FAIL missing bytes"); end
    if (SmA || SmB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
