// CommandParse: collects the payload of a command packet.
//
// The command payload is a one-byte command packet header, a one-byte command
// ID and five command data bytes. Bytes arrive from the command RxPackets
// instance (DataIn with DataValid) while Frame (the command packet enable) is
// high; the byte count restarts whenever Frame is low, and bytes after the
// seventh (Ethernet padding) are ignored. When the seventh byte arrives and the
// first was the header value 0xAA, CmdIdOut and CmdData (first data byte in
// bits 39:32) are loaded and OutReady pulses for one clock on the next edge.
// A packet with a wrong header byte is dropped and counted in BadHeaderCount.
// Field sizes and the header value follow the original design.
module CommandParse
  import strs_radio_pkg::*;
(
  input  logic        Clk,
  input  logic        Reset,
  input  logic        Frame,
  input  logic [7:0]  DataIn,
  input  logic        DataValid,
  output logic        OutReady,
  output logic [7:0]  CmdIdOut,
  output logic [39:0] CmdData,
  output logic [7:0]  BadHeaderCount
);
  localparam int NBYTES = 2 + CMD_DATA_BYTES;
  logic [3:0]  cnt;
  logic [55:0] sh;
  logic [55:0] nxt;
  assign nxt = {sh[47:0], DataIn};

  always_ff @(posedge Clk) begin
    if (Reset) begin
      cnt            <= '0;
      sh             <= '0;
      OutReady       <= 1'b0;
      CmdIdOut       <= '0;
      CmdData        <= '0;
      BadHeaderCount <= '0;
    end else begin
      OutReady <= 1'b0;
      if (!Frame) cnt <= '0;
      else if (DataValid && cnt < 4'(NBYTES)) begin
        sh  <= nxt;
        cnt <= cnt + 4'd1;
        if (cnt == 4'(NBYTES - 1)) begin
          if (nxt[55:48] == CMD_PKT_HEADER) begin
            CmdIdOut <= nxt[47:40];
            CmdData  <= nxt[39:0];
            OutReady <= 1'b1;
          end else begin
            BadHeaderCount <= BadHeaderCount + 8'd1;
          end
        end
      end
    end
  end
endmodule
