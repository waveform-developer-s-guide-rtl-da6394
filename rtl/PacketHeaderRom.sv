// PacketHeaderRom: the 42-byte header of frames sent to the processor.
//
// A read-only table of the MAC header (host MAC, FPGA MAC, type 0x0800), the
// IPv4 header (no options, identification 0, don't-fragment, TTL 64, UDP,
// 192.168.0.2 to 192.168.0.1) and the UDP header (source and destination port
// PORT, length 8+PAYLOAD_LEN, checksum 0, which UDP allows). The contents,
// including the IP header checksum, are computed when the design is
// elaborated (strs_radio_pkg::header_byte). Data is combinational from Addr;
// addresses 42 to 63 read zero. Headers made at design time and stored in a
// ROM, the zero UDP checksum and the checksum rule follow the original design;
// the MAC addresses are placeholders of this design.
module PacketHeaderRom
  import strs_radio_pkg::*;
#(
  parameter int          PAYLOAD_LEN = PACKET_SIZE - HEADER_SIZE,
  parameter logic [15:0] PORT        = {CMD_PKT_BYTE1, CMD_PKT_BYTE2}
) (
  input  logic [5:0] Addr,
  output logic [7:0] Data
);
  typedef logic [7:0] rom_t [64];
  function automatic rom_t make_rom();
    rom_t r;
    for (int i = 0; i < 64; i++) r[i] = (i < HEADER_SIZE) ? header_byte(i, PAYLOAD_LEN, PORT) : 8'h00;
    return r;
  endfunction
  localparam rom_t ROM = make_rom();

  assign Data = ROM[Addr];
endmodule
