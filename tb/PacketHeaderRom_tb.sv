// PacketHeaderRom_tb: reads both header ROMs and compares them with headers
// built here field by field. The 18-byte-payload (command response) IP header
// is the worked example 4500 002E 0000 4000 4011 XXXX C0A8 0002 C0A8 0001,
// whose checksum must be 0xB96B.
module PacketHeaderRom_tb;
  logic [5:0] a;
  logic [7:0] d_resp, d_str;
  int checks = 0, failures = 0;

  PacketHeaderRom #(.PAYLOAD_LEN(18), .PORT(16'h8C35)) r1 (.Addr(a), .Data(d_resp));
  PacketHeaderRom #(.PAYLOAD_LEN(515), .PORT(16'h8CA0)) r2 (.Addr(a), .Data(d_str));

  function automatic logic [7:0] ref_byte(input int i, input int len, input logic [15:0] port, input logic [15:0] csum);
    logic [335:0] h;
    h = {48'h0011_2233_4455, 48'h000A_3501_0203, 16'h0800,
         16'h4500, 16'(28 + len), 16'h0000, 16'h4000, 16'h4011, csum, 32'hC0A8_0002, 32'hC0A8_0001,
         port, port, 16'(8 + len), 16'h0000};
    return h[335 - 8*i -: 8];
  endfunction

  // reference checksum of a header, computed by 32-bit integer arithmetic
  function automatic logic [15:0] ref_csum(input int len);
    int s = 'h4500 + (28 + len) + 'h0000 + 'h4000 + 'h4011 + 'hC0A8 + 'h0002 + 'hC0A8 + 'h0001;
    while (s > 'hFFFF) s = (s & 'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  initial begin
    checks++;
    if (ref_csum(18) != 16'hB96B) begin failures++; $display("FAIL reference checksum"); end
    for (int i = 0; i < 64; i++) begin
      a = 6'(i); #1;
      checks += 2;
      if (d_resp != (i < 42 ? ref_byte(i, 18, 16'h8C35, 16'hB96B) : 8'h00)) begin
        failures++; $display("FAIL resp byte %0d = %h", i, d_resp);
      end
      if (d_str != (i < 42 ? ref_byte(i, 515, 16'h8CA0, ref_csum(515)) : 8'h00)) begin
        failures++; $display("FAIL stream byte %0d = %h", i, d_str);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
