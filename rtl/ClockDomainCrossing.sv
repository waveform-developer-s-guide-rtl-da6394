// ClockDomainCrossing: carries a multi-bit word safely between clock domains.
//
// A toggle handshake: when the source side is idle it captures
// SrcData into a holding register and toggles req; req reaches the destination
// through two flip-flops, the destination copies the (by then stable) holding
// register into DstData, pulses DstValid and toggles ack; ack returns through
// two flip-flops and frees the source side, which captures again. The word is
// thus refreshed continuously, every few clocks of the slower domain, and
// DstData is always a word that SrcData held at one instant. The original
// design names a clock domain crossing module; the handshake is this design's
// choice. Both resets are synchronous and must overlap for a few clocks.
module ClockDomainCrossing #(
  parameter int WIDTH = 32
) (
  input  logic             SrcClk,
  input  logic             SrcReset,
  input  logic [WIDTH-1:0] SrcData,
  input  logic             DstClk,
  input  logic             DstReset,
  output logic [WIDTH-1:0] DstData,
  output logic             DstValid
);
  logic [WIDTH-1:0] hold;
  logic req, ack_s1, ack_s2;
  logic ack, req_d1, req_d2;

  always_ff @(posedge SrcClk) begin
    if (SrcReset) begin
      hold <= '0; req <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
      if (ack_s2 == req) begin
        hold <= SrcData;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge DstClk) begin
    if (DstReset) begin
      req_d1 <= 1'b0; req_d2 <= 1'b0; ack <= 1'b0; DstData <= '0; DstValid <= 1'b0;
    end else begin
      req_d1   <= req;
      req_d2   <= req_d1;
      DstValid <= 1'b0;
      if (req_d2 != ack) begin
        DstData  <= hold;
        DstValid <= 1'b1;
        ack      <= req_d2;
      end
    end
  end
endmodule
