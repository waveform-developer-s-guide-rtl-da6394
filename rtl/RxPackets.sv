// RxPackets: removes the rest of the packet header and passes on the payload.
//
// While Enable is high, each valid byte (DataIn with DataValid) is counted; the
// first HeaderLen bytes are dropped and every later byte is output on DataOut
// with DataOutValid one clock later. The count restarts whenever Enable is low,
// so each enabled packet is handled on its own. The wrapper uses one instance
// for command packets (HeaderLen 26: the UDP/IP header bytes left when the
// enable rises) and one for streaming packets (HeaderLen 29, which also drops
// the three-byte streaming payload header). HeaderLen values follow the
// original design. SMFailure is set if the state register reaches an
// undefined value.
module RxPackets
  import strs_radio_pkg::*;
#(
  parameter int HeaderLen = REMAINING_HEADER_SIZE
) (
  input  logic       Clk,
  input  logic       Reset,
  input  logic       Enable,
  input  logic [7:0] DataIn,
  input  logic       DataValid,
  output logic [7:0] DataOut,
  output logic       DataOutValid,
  output logic       SMFailure
);
  typedef enum logic [1:0] {S_WAIT = 2'd0, S_HEADER = 2'd1, S_PAYLOAD = 2'd2} state_e;
  state_e state;
  logic [$clog2(HeaderLen+1)-1:0] cnt;

  always_ff @(posedge Clk) begin
    if (Reset) begin
      state        <= S_WAIT;
      cnt          <= '0;
      DataOut      <= '0;
      DataOutValid <= 1'b0;
      SMFailure    <= 1'b0;
    end else begin
      DataOutValid <= 1'b0;
      DataOut      <= DataIn;
      if (!Enable) begin
        state <= S_WAIT;
        cnt   <= '0;
      end else if (DataValid) begin
        case (state)
          S_WAIT, S_HEADER: begin
            if (cnt == ($bits(cnt))'(HeaderLen - 1)) state <= S_PAYLOAD;
            else begin
              state <= S_HEADER;
              cnt   <= cnt + 1'b1;
            end
          end
          S_PAYLOAD: DataOutValid <= 1'b1;
          default: begin
            SMFailure <= 1'b1;
            state     <= S_WAIT;
          end
        endcase
      end
    end
  end
endmodule
