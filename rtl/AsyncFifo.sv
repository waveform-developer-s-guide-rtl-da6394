// AsyncFifo: dual-clock first-in first-out buffer.
//
// Gray-coded read and write pointers cross the clock boundary through two
// flip-flops each. Full is judged in the write domain, empty in the read
// domain, both conservatively. rd_count is the fill level seen from the read
// side (it may lag by the synchroniser delay). The read data is first-word
// fall-through: rd_data shows the head entry whenever rd_empty is low, and
// rd_en pops it. Writes when full and reads when empty are ignored.
// DEPTH must be a power of two. Each side has a synchronous reset; both
// resets must be held together for a few clocks of the slower side.
module AsyncFifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic [$clog2(DEPTH):0] rd_count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  // read domain
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign rd_empty  = (rgray == wgray_r2);
  assign rd_data   = mem[rbin[AW-1:0]];
  assign rd_count  = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end
endmodule
