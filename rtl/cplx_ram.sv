// cplx_ram: on-chip buffer of complex double-precision words.
//
// One synchronous write port and NRD synchronous read ports: data of read
// port p appears on rdata[p] one clock after raddr[p] is presented. A read
// of the address being written in the same cycle returns the old word. There
// is no reset; the contents are whatever was last written. The emulation
// kernels use it for their layer-matrix buffers, state-vector buffers and
// intermediate product buffers. The port arrangement and the one-cycle read
// latency are this design's choices; several read ports map to replicated
// block RAMs on an FPGA.
module cplx_ram
  import qemu_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRD   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic [AW-1:0] raddr [NRD],
  output cplx_t         rdata [NRD]
);

  cplx_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) begin
      rdata[p] <= mem[raddr[p]];
    end
  end

endmodule
