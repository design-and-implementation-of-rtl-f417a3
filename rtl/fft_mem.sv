// fft_mem: the in-place data memory of the memory-based FFT processor.
//
// DEPTH complex words of W bits per part.  Four asynchronous read ports and
// four write ports, so that one radix-4 butterfly can read its four operands
// and write back its four results in one clock cycle.  Writes take effect at
// the rising clock edge; the controller never writes one address from two
// ports in the same cycle (checked by an assertion).  The memory is not reset:
// every word is written during loading before it is read.
//
// The processor is memory-based by specification; the organisation of the
// memory, a four-port array, is this design's own choice.  On an FPGA it maps
// to registers; block RAM would need four banks with conflict-free
// addressing, which is not done here.
module fft_mem #(
  parameter int DEPTH = 256,
  parameter int W     = 26,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       raddr [4],
  output logic signed [W-1:0] rdata_re [4],
  output logic signed [W-1:0] rdata_im [4],
  input  logic [3:0]          we,
  input  logic [AW-1:0]       waddr [4],
  input  logic signed [W-1:0] wdata_re [4],
  input  logic signed [W-1:0] wdata_im [4]
);

  logic signed [W-1:0] mem_re [DEPTH];
  logic signed [W-1:0] mem_im [DEPTH];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rdata_re[p] = mem_re[raddr[p]];
      rdata_im[p] = mem_im[raddr[p]];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) begin
      if (we[p]) begin
        mem_re[waddr[p]] <= wdata_re[p];
        mem_im[waddr[p]] <= wdata_im[p];
      end
    end
  end

  // Two ports must not write the same word in one cycle.
  for (genvar p = 0; p < 4; p++) begin : g_chk
    for (genvar r = p + 1; r < 4; r++) begin : g_pair
      a_no_collide: assert property (@(posedge clk)
        !(we[p] && we[r] && waddr[p] == waddr[r]))
        else $error("fft_mem: ports %0d and %0d write address %0d together", p, r, waddr[p]);
    end
  end

endmodule
