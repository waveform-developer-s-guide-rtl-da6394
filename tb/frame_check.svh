// frame_check.svh: shared testbench helpers for frames sent to the host.
// hdr_errors() checks the 42 header bytes of a frame on its own terms: the
// MAC addresses and EtherType, the IP version, length, protocol and addresses,
// that the IP header sums (ones' complement) to 0xFFFF, and the UDP ports and
// length. It returns the number of fields found wrong.
function automatic int hdr_errors(input logic [7:0] f [$], input int payload_len, input logic [15:0] port);
  int e;
  logic [31:0] sum;
  e = 0;
  if (f.size() < 42) return 99;
  if ({f[0], f[1], f[2], f[3], f[4], f[5]} != 48'h0011_2233_4455) e++;
  if ({f[6], f[7], f[8], f[9], f[10], f[11]} != 48'h000A_3501_0203) e++;
  if ({f[12], f[13]} != 16'h0800) e++;
  if (f[14] != 8'h45) e++;
  if ({f[16], f[17]} != 16'(payload_len + 28)) e++;
  if (f[23] != 8'h11) e++;
  if ({f[26], f[27], f[28], f[29]} != 32'hC0A8_0002) e++;
  if ({f[30], f[31], f[32], f[33]} != 32'hC0A8_0001) e++;
  sum = 0;
  for (int i = 14; i < 34; i += 2) sum += 32'({f[i], f[i+1]});
  sum = 32'(sum[15:0]) + 32'(sum[31:16]);
  sum = 32'(sum[15:0]) + 32'(sum[31:16]);
  if (sum[15:0] != 16'hFFFF) e++;
  if ({f[34], f[35]} != port || {f[36], f[37]} != port) e++;
  if ({f[38], f[39]} != 16'(payload_len + 8)) e++;
  return e;
endfunction
