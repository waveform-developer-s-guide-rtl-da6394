// AsyncFifo_tb: self-checking testbench for the dual-clock FIFO.
//
// Write clock 8 ns, read clock 5.1 ns, so the two sides drift against each
// other. Phase 1 fills the FIFO with the reader stopped and checks that
// wr_full rises at DEPTH entries and that further writes are dropped.
// Phase 2 drains it and checks order, then rd_empty. Phase 3 writes and reads
// with random enables for several thousand words and checks every word
// against a reference queue. A watchdog ends the run if it hangs.
module AsyncFifo_tb;
  timeunit 1ns; timeprecision 10ps;
  localparam int WIDTH = 16;
  localparam int DEPTH = 16;

  logic wr_clk = 0, rd_clk = 0;
  always #4 wr_clk = ~wr_clk;
  always #2.55 rd_clk = ~rd_clk;

  logic wr_rst, rd_rst, wr_en, rd_en, wr_full, rd_empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] rd_count;

  AsyncFifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q[$];
  bit reading = 0, writing = 0;
  int nwr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // random writer
  always @(posedge wr_clk) begin
    if (writing && !wr_rst) begin
      if (wr_en && !wr_full) q.push_back(wr_data);
      wr_en   <= ($urandom % 3) != 0;
      wr_data <= WIDTH'($urandom);
    end
  end

  // random reader with order check
  logic [WIDTH-1:0] exp_w;
  always @(posedge rd_clk) begin
    if (reading && !rd_rst) begin
      if (rd_en && !rd_empty) begin
        if (q.size() == 0) check(0, "read with empty model");
        else begin
          exp_w = q.pop_front();
          check(rd_data == exp_w, $sformatf("order: got %h exp %h", rd_data, exp_w));
        end
      end
      rd_en <= ($urandom % 3) != 0;
    end
  end

  initial begin
    #2000000 $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wr_rst = 1; rd_rst = 1; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (5) @(posedge wr_clk);
    @(negedge wr_clk) wr_rst = 0;
    @(negedge rd_clk) rd_rst = 0;
    repeat (4) @(posedge wr_clk);
    check(rd_empty && !wr_full, "empty after reset");

    // phase 1: fill
    for (int i = 0; i < DEPTH + 4; i++) begin
      @(negedge wr_clk);
      wr_en = 1; wr_data = WIDTH'(16'hA000 + i);
      if (i < DEPTH) check(!wr_full, $sformatf("not full at %0d", i));
      @(posedge wr_clk);
      if (!wr_full || i < DEPTH) q.push_back(wr_data);
    end
    @(negedge wr_clk) wr_en = 0;
    check(wr_full, "full at DEPTH");
    check(q.size() == DEPTH, "model holds DEPTH");
    repeat (6) @(posedge rd_clk);
    check(int'(rd_count) == DEPTH, $sformatf("rd_count %0d", rd_count));

    // phase 2: drain
    while (q.size() > 0) begin
      @(negedge rd_clk);
      check(!rd_empty, "data available while draining");
      check(rd_data == q[0], $sformatf("drain: got %h exp %h", rd_data, q[0]));
      rd_en = 1;
      @(posedge rd_clk);
      void'(q.pop_front());
      #0.1 rd_en = 0;
    end
    @(negedge rd_clk) rd_en = 0;
    @(posedge rd_clk); #0.1;
    check(rd_empty, "empty after drain");
    repeat (6) @(posedge wr_clk);
    check(!wr_full, "not full after drain");

    // phase 3: random traffic
    @(negedge wr_clk) writing = 1;
    @(negedge rd_clk) reading = 1;
    repeat (20000) @(posedge wr_clk);
    @(negedge wr_clk) writing = 0; wr_en = 0;
    repeat (200) @(posedge rd_clk);
    check(q.size() == 0 && rd_empty, $sformatf("all words read (%0d left)", q.size()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
