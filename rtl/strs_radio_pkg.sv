// strs_radio_pkg: constants, types and design-time functions shared by the
// wrapper and the test waveform.
//
// Packet sizes, port numbers and packet-timing constants are the values of the
// original radio package. The LocalLink bundle type, the command encodings, the
// MAC addresses and the header-building functions are this design's choices.
// Packet headers sent to the processor are generated at elaboration time by
// header_byte(), including the IP header checksum (one's-complement sum of the
// 16-bit header words, carries folded back, result inverted).
package strs_radio_pkg;

  // ---- packet geometry ---------------------------------------------------
  localparam int PACKET_SIZE           = 60;   // command response frame, bytes
  localparam int DATA_PACKET_SIZE      = 557;  // streaming frame, bytes
  localparam int HEADER_SIZE           = 42;   // MAC + IP + UDP header, bytes
  localparam int SOURCE_PORT_BYTE      = 33;   // UDP source port follows this byte index
  localparam int REMAINING_HEADER_SIZE = 26;   // header bytes left once a packet is enabled
  localparam int COMMAND_RESPONSE_SIZE = 120;  // response payload, bits
  localparam logic [7:0] STREAM_PKT_BYTE1 = 8'h8C;
  localparam logic [7:0] STREAM_PKT_BYTE2 = 8'hA0;
  localparam logic [7:0] CMD_PKT_BYTE1    = 8'h8C;
  localparam logic [7:0] CMD_PKT_BYTE2    = 8'h35;
  localparam int WAIT_CNT              = 500;  // idle cycles between streaming packets
  localparam int PACKET_NUM_CNT        = 4;    // streaming packets per group

  // ---- payload conventions ------------------------------------------------
  localparam logic [7:0] CMD_PKT_HEADER    = 8'hAA;  // first payload byte of a command
  localparam logic [7:0] RESP_PKT_HEADER   = 8'hAA;  // first payload byte of a response
  localparam logic [7:0] STREAM_PKT_HEADER = 8'h55;
  localparam logic [7:0] STREAM_DATA_ID    = 8'h0A;
  localparam int         STREAM_PAYLOAD    = 512;    // streaming data bytes per packet
  localparam int         CMD_DATA_BYTES    = 5;

  // ---- addresses (design choice, documented example IPs) -----------------
  localparam logic [47:0] FPGA_MAC = 48'h000A_3501_0203;
  localparam logic [47:0] HOST_MAC = 48'h0011_2233_4455;
  localparam logic [31:0] FPGA_IP  = 32'hC0A8_0002;   // 192.168.0.2
  localparam logic [31:0] HOST_IP  = 32'hC0A8_0001;   // 192.168.0.1

  // ---- command identifiers -------------------------------------------------
  typedef enum logic [7:0] {
    CMD_WRITE_CMDREG = 8'h01,  // data[0:1] -> CmdRegOut
    CMD_STREAM_EN    = 8'h02,  // data[0] bit0 -> Rx-side streaming enable
    CMD_SET_LEDS     = 8'h03,  // data[0] -> LEDs
    CMD_READ_DIP     = 8'h04,  // response data[0] = dip switches
    CMD_STATUS       = 8'h05,  // response data[0:4] = StatusBits
    CMD_BERT         = 8'h06,  // response data[0:7] = bits, [8:11] = errors
    CMD_SOFT_RESET   = 8'h07,  // commanded reset, no response
    CMD_CLEAR_FLAGS  = 8'h08   // pulse FlagResetOut
  } cmd_id_e;

  localparam logic [7:0] RESP_ACCEPTED = 8'h01;
  localparam logic [7:0] RESP_REJECTED = 8'h00;

  // CmdRegOut fields
  localparam int CR_TXSRC_LSB = 0;   // [1:0] Tx source
  localparam int CR_ERRINS    = 2;   // error insertion enable
  localparam int CR_NRZM      = 3;   // NRZ-M encoding before BPSK
  localparam int CR_PSF       = 6;   // root-raised-cosine pulse shaping of BPSK
  localparam int CR_RXSRC_LSB = 4;   // [5:4] Rx stream source
  localparam int CR_FREQ_LSB  = 8;   // [15:8] tone frequency word

  typedef enum logic [1:0] {TX_SINE = 2'd0, TX_STREAM = 2'd1, TX_PRBS_BPSK = 2'd2, TX_STREAM_BPSK = 2'd3} tx_src_e;
  typedef enum logic [1:0] {RX_ADC = 2'd0, RX_LOOPBACK = 2'd1, RX_PRBS = 2'd2} rx_src_e;

  // ---- LocalLink byte bundle (8 data + 3 active-low framing = 11 bits) ----
  typedef struct packed {
    logic [7:0] data;
    logic       sof_n;
    logic       eof_n;
    logic       src_rdy_n;
  } ll_t;
  localparam ll_t LL_IDLE = '{data: 8'h00, sof_n: 1'b1, eof_n: 1'b1, src_rdy_n: 1'b1};

  // ---- helpers -----------------------------------------------------------
  // Number of ones in a byte: the error-count look-up table of the BERT.
  function automatic logic [3:0] ones8(input logic [7:0] b);
    logic [3:0] n = '0;
    for (int i = 0; i < 8; i++) n += 4'(b[i]);
    return n;
  endfunction

  // One's-complement IP header checksum over ten 16-bit words (word 5 ignored).
  function automatic logic [15:0] ip_checksum(input logic [159:0] hdr);
    logic [19:0] sum = '0;
    for (int w = 0; w < 10; w++)
      if (w != 5) sum += 20'(hdr[159 - 16*w -: 16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    sum = 20'(sum[15:0]) + 20'(sum[19:16]);
    return ~sum[15:0];
  endfunction

  // 20-byte IP header, checksum field zero, for a UDP payload of len bytes.
  function automatic logic [159:0] ip_header(input int len);
    logic [15:0] tot = 16'(20 + 8 + len);
    return {16'h4500, tot, 16'h0000, 16'h4000, 16'h4011, 16'h0000, FPGA_IP, HOST_IP};
  endfunction

  // Byte idx (0..41) of the MAC/IP/UDP header of a frame to the processor.
  function automatic logic [7:0] header_byte(input int idx, input int len, input logic [15:0] port);
    logic [159:0] ip  = ip_header(len);
    logic [15:0]  ulen = 16'(8 + len);
    logic [335:0] h;
    ip[79:64] = ip_checksum(ip);
    h = {HOST_MAC, FPGA_MAC, 16'h0800, ip, port, port, ulen, 16'h0000};
    return h[335 - 8*idx -: 8];
  endfunction

endpackage
