// mv_kernel: complex matrix-vector emulation kernel (Type-1 / Type-2 design).
//
// The kernel holds K layer matrices M_0..M_{K-1} of size N x N (N = 2^N_QUBITS)
// and a state vector S of N amplitudes, all complex binary64. After a start
// pulse it applies the first n_layers matrices in order,
//     S <- M_{n_layers-1} * ... * M_1 * M_0 * S,
// one complex multiply-accumulate per clock. The state lives in two
// ping-pong halves of one buffer: each layer reads one half and writes the
// other, and the output of a call stays in place as the input of the next
// call, so a circuit of L layers runs as r = L/K calls with K matrices
// loaded per call. With K = 1 this is the Type-1 design; with K > 1 it is the
// Type-2 design. The K-matrix buffer, the feedback of the output state and the
// 64-bit complex arithmetic follow the emulator's description; the host ports,
// the n_layers input and the one-MAC-per-cycle schedule are this design's.
//
// Host side (accepted only while busy is low):
//   m_we/m_sel/m_addr/m_wdata  write element m_addr = row*N + col of matrix m_sel
//   s_we/s_addr/s_wdata        write amplitude s_addr of the current state
//   s_raddr -> s_rdata         read amplitude of the current state, one clock later
// Control: start (one-cycle pulse, 1 <= n_layers <= K), busy, done (one-cycle pulse).
// Timing: done rises n_layers*N*N + 1 clocks after the cycle in which start is
// sampled; the matrix element stream is issued back to back with no bubbles.
module mv_kernel
  import qemu_pkg::*;
#(
  parameter int unsigned N_QUBITS = 7,
  parameter int unsigned K        = 1,
  localparam int unsigned N       = 1 << N_QUBITS,
  localparam int unsigned KW      = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW      = $clog2(K + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // layer matrix load
  input  logic                  m_we,
  input  logic [KW-1:0]         m_sel,
  input  logic [2*N_QUBITS-1:0] m_addr,
  input  cplx_t                 m_wdata,
  // state vector load / unload
  input  logic                  s_we,
  input  logic [N_QUBITS-1:0]   s_addr,
  input  cplx_t                 s_wdata,
  input  logic [N_QUBITS-1:0]   s_raddr,
  output cplx_t                 s_rdata,
  // control
  input  logic                  start,
  input  logic [LW-1:0]         n_layers,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned MAW = $clog2(K) + 2 * N_QUBITS;
  localparam int unsigned MDEPTH = K * N * N;

  // ---------------- buffers ----------------
  logic          mram_we;
  logic [MAW-1:0] mram_waddr;
  logic [MAW-1:0] mram_raddr [1];
  cplx_t         mram_rdata [1];

  logic                sram_we;
  logic [N_QUBITS:0]   sram_waddr;
  cplx_t               sram_wdata;
  logic [N_QUBITS:0]   sram_raddr [1];
  cplx_t               sram_rdata [1];

  cplx_ram #(.DEPTH(MDEPTH), .NRD(1)) u_mbuf (
    .clk, .we(mram_we), .waddr(mram_waddr), .wdata(m_wdata),
    .raddr(mram_raddr), .rdata(mram_rdata)
  );

  cplx_ram #(.DEPTH(2 * N), .NRD(1)) u_sbuf (
    .clk, .we(sram_we), .waddr(sram_waddr), .wdata(sram_wdata),
    .raddr(sram_raddr), .rdata(sram_rdata)
  );

  // ---------------- issue stage ----------------
  typedef enum logic [0:0] {IDLE, RUN} state_e;
  state_e state;

  logic                cur;       // half holding the current state
  logic [LW-1:0]       layers;    // number of layers of this call
  logic [LW-1:0]       layer;
  logic [N_QUBITS-1:0] row, col;
  logic                rd_half;   // half read by the layer being issued

  // ---------------- MAC stage ----------------
  logic                v1, first1, last1, final1;
  logic                wr_half1;
  logic [N_QUBITS-1:0] row1;
  cplx_t               acc, acc_in, mac_y;

  wire issue_last_col   = (col == N_QUBITS'(N - 1));
  wire issue_last_row   = (row == N_QUBITS'(N - 1));
  wire issue_last_layer = (layer == layers - LW'(1));

  assign busy = (state != IDLE) || v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cur     <= 1'b0;
      layers  <= '0;
      layer   <= '0;
      row     <= '0;
      col     <= '0;
      rd_half <= 1'b0;
      v1      <= 1'b0;
      first1  <= 1'b0;
      last1   <= 1'b0;
      final1  <= 1'b0;
      wr_half1 <= 1'b0;
      row1    <= '0;
      acc     <= CPLX_ZERO;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;

      // issue
      v1 <= 1'b0;
      if (state == IDLE) begin
        if (start && !busy) begin
          state   <= RUN;
          layers  <= n_layers;
          layer   <= '0;
          row     <= '0;
          col     <= '0;
          rd_half <= cur;
        end
      end else begin
        v1       <= 1'b1;
        first1   <= (col == '0);
        last1    <= issue_last_col;
        final1   <= issue_last_col && issue_last_row && issue_last_layer;
        wr_half1 <= ~rd_half;
        row1     <= row;
        col      <= col + 1'b1;
        if (issue_last_col) begin
          row <= row + 1'b1;
          if (issue_last_row) begin
            rd_half <= ~rd_half;
            layer   <= layer + 1'b1;
            if (issue_last_layer) state <= IDLE;
          end
        end
      end

      // multiply-accumulate and write back
      if (v1) begin
        acc <= mac_y;
        if (final1) begin
          cur  <= wr_half1;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    acc_in = first1 ? CPLX_ZERO : acc;
  end

  cmac u_cmac (.a(mram_rdata[0]), .b(sram_rdata[0]), .acc(acc_in), .y(mac_y));

  // buffer port steering: kernel while running, host while idle
  always_comb begin
    mram_we       = m_we && !busy;
    mram_waddr    = (K == 1) ? MAW'(m_addr) : MAW'({m_sel, m_addr});
    mram_raddr[0] = (K == 1) ? MAW'({row, col}) : MAW'({KW'(layer), row, col});

    if (v1) begin
      sram_we    = last1;
      sram_waddr = {wr_half1, row1};
      sram_wdata = mac_y;
    end else begin
      sram_we    = s_we && !busy;
      sram_waddr = {cur, s_addr};
      sram_wdata = s_wdata;
    end
    sram_raddr[0] = (state == RUN) ? {rd_half, col} : {cur, s_raddr};
  end

  assign s_rdata = sram_rdata[0];

  // the host must leave the buffers alone while the kernel runs
  a_no_host_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(m_we || s_we));
  a_layers_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (n_layers != '0 && 32'(n_layers) <= K));

endmodule
