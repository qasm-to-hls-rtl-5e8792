// qasm_emu_top: FPGA side of a layer-by-layer quantum circuit emulator.
//
// A circuit of n qubits is cut by host software into L layers, each turned
// into one 2^n x 2^n complex layer matrix; emulating the circuit means
// multiplying the initial state vector by those matrices in order. This top
// holds the two kinds of emulation architecture side by side, each with its
// own host port:
//   * mv  - a matrix-vector kernel with K_MV layer-matrix buffers. With
//           K_MV = 1 it is the Type-1 design (one matrix per call); with
//           K_MV > 1 the Type-2 design (K matrices per call, r = L/K calls).
//   * Type-3 - a matrix-matrix kernel (mm) that folds K_MM layer matrices per
//           call into a running circuit matrix M_total, and a second
//           matrix-vector kernel (t3mv, one matrix buffer) that applies
//           M_total to the input state once.
// In the Type-3 pair, M_total goes back to the host ("to PS") and the host
// loads it into t3mv, as in the emulator's description; there is no direct
// path between the two kernels. All arithmetic is complex IEEE-754 binary64.
// Default sizes: 7 qubits (the largest circuit of the reported results) and
// K_MV = 1 (the configuration that was measured); K_MM = 4 is this design's
// choice. The ports of each kernel are described in mv_kernel and mm_kernel.
module qasm_emu_top
  import qemu_pkg::*;
#(
  parameter int unsigned N_QUBITS = 7,
  parameter int unsigned K_MV     = 1,
  parameter int unsigned K_MM     = 4,
  localparam int unsigned KWV     = (K_MV > 1) ? $clog2(K_MV) : 1,
  localparam int unsigned KWM     = (K_MM > 1) ? $clog2(K_MM) : 1,
  localparam int unsigned LWV     = $clog2(K_MV + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,

  // Type-1 / Type-2 matrix-vector kernel
  input  logic                  mv_m_we,
  input  logic [KWV-1:0]        mv_m_sel,
  input  logic [2*N_QUBITS-1:0] mv_m_addr,
  input  cplx_t                 mv_m_wdata,
  input  logic                  mv_s_we,
  input  logic [N_QUBITS-1:0]   mv_s_addr,
  input  cplx_t                 mv_s_wdata,
  input  logic [N_QUBITS-1:0]   mv_s_raddr,
  output cplx_t                 mv_s_rdata,
  input  logic                  mv_start,
  input  logic [LWV-1:0]        mv_n_layers,
  output logic                  mv_busy,
  output logic                  mv_done,

  // Type-3 matrix-matrix kernel
  input  logic                  mm_m_we,
  input  logic [KWM-1:0]        mm_m_sel,
  input  logic [2*N_QUBITS-1:0] mm_m_addr,
  input  cplx_t                 mm_m_wdata,
  input  logic [2*N_QUBITS-1:0] mm_t_raddr,
  output cplx_t                 mm_t_rdata,
  input  logic                  mm_start,
  input  logic                  mm_accumulate,
  output logic                  mm_busy,
  output logic                  mm_done,

  // Type-3 matrix-vector kernel (applies M_total)
  input  logic                  t3_m_we,
  input  logic [2*N_QUBITS-1:0] t3_m_addr,
  input  cplx_t                 t3_m_wdata,
  input  logic                  t3_s_we,
  input  logic [N_QUBITS-1:0]   t3_s_addr,
  input  cplx_t                 t3_s_wdata,
  input  logic [N_QUBITS-1:0]   t3_s_raddr,
  output cplx_t                 t3_s_rdata,
  input  logic                  t3_start,
  output logic                  t3_busy,
  output logic                  t3_done
);

  mv_kernel #(.N_QUBITS(N_QUBITS), .K(K_MV)) u_mv (
    .clk, .rst_n,
    .m_we(mv_m_we), .m_sel(mv_m_sel), .m_addr(mv_m_addr), .m_wdata(mv_m_wdata),
    .s_we(mv_s_we), .s_addr(mv_s_addr), .s_wdata(mv_s_wdata),
    .s_raddr(mv_s_raddr), .s_rdata(mv_s_rdata),
    .start(mv_start), .n_layers(mv_n_layers), .busy(mv_busy), .done(mv_done)
  );

  mm_kernel #(.N_QUBITS(N_QUBITS), .K(K_MM)) u_mm (
    .clk, .rst_n,
    .m_we(mm_m_we), .m_sel(mm_m_sel), .m_addr(mm_m_addr), .m_wdata(mm_m_wdata),
    .t_raddr(mm_t_raddr), .t_rdata(mm_t_rdata),
    .start(mm_start), .accumulate(mm_accumulate), .busy(mm_busy), .done(mm_done)
  );

  mv_kernel #(.N_QUBITS(N_QUBITS), .K(1)) u_t3mv (
    .clk, .rst_n,
    .m_we(t3_m_we), .m_sel(1'b0), .m_addr(t3_m_addr), .m_wdata(t3_m_wdata),
    .s_we(t3_s_we), .s_addr(t3_s_addr), .s_wdata(t3_s_wdata),
    .s_raddr(t3_s_raddr), .s_rdata(t3_s_rdata),
    .start(t3_start), .n_layers(1'b1), .busy(t3_busy), .done(t3_done)
  );

endmodule
