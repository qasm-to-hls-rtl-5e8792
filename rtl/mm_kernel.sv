// mm_kernel: complex matrix-matrix emulation kernel (Type-3 design, first kernel).
//
// The kernel holds K layer matrices M_0..M_{K-1} (N x N complex binary64,
// N = 2^N_QUBITS, K a power of two) and reduces them to one circuit matrix.
// Matrices are multiplied in pairs, later layer on the left, in a tree of
// log2(K) levels whose partial products go to intermediate buffers:
//     P_j = M_{2j+1} * M_{2j},  then the P's in pairs, ... down to one root R.
// The products of one level are independent and run concurrently on
// max(1, K/2) complex MAC units that step through the same i, j, k loop in
// lockstep. The root is then multiplied into the running circuit matrix:
//     M_total <- R * M_total, or M_total <- R when accumulate is low
// (the right operand is then an identity matrix generated on the fly).
//
// Every matrix slot is a buffer of its own, so each MAC reads its two
// operands and writes its result without sharing a port. Slots are laid out
// heap-like: 0..K-1 hold the inputs, K..2K-2 the partial products (root at
// 2K-2), and 2K-1, 2K are the two ping-pong copies of M_total. Level v reads
// from base b_v = 2K - 2*(K >> v); its unit u reads slots b_v+2u+1 (left)
// and b_v+2u (right) and writes slot b_v + (K >> v) + u. M_total from one
// call feeds the next, so a circuit of L layers takes r = L/K calls, after
// which the host reads M_total and hands it to a matrix-vector kernel.
// The pairwise tree, the concurrent products of a level, the intermediate
// buffers and the feedback of M_total follow the emulator's description; the
// slot layout, the lockstep schedule and the host ports are this design's.
//
// Host side (accepted only while busy is low):
//   m_we/m_sel/m_addr/m_wdata  write element m_addr = row*N + col of input matrix m_sel
//   t_raddr -> t_rdata         read element of M_total, one clock later
// Control: start (one-cycle pulse), accumulate (sampled with start), busy, done.
// Timing: done rises (log2(K) + 1)*N^3 + 1 clocks after the cycle in which
// start is sampled: N^3 clocks per tree level plus N^3 for the final product.
module mm_kernel
  import qemu_pkg::*;
#(
  parameter int unsigned N_QUBITS = 7,
  parameter int unsigned K        = 4,
  localparam int unsigned N       = 1 << N_QUBITS,
  localparam int unsigned KW      = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SLOTS   = 2 * K + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // layer matrix load
  input  logic                  m_we,
  input  logic [KW-1:0]         m_sel,
  input  logic [2*N_QUBITS-1:0] m_addr,
  input  cplx_t                 m_wdata,
  // circuit matrix unload
  input  logic [2*N_QUBITS-1:0] t_raddr,
  output cplx_t                 t_rdata,
  // control
  input  logic                  start,
  input  logic                  accumulate,
  output logic                  busy,
  output logic                  done
);

  localparam int unsigned AW     = 2 * N_QUBITS;
  localparam int unsigned LEVELS = $clog2(K);             // tree levels
  localparam int unsigned VW     = $clog2(LEVELS + 1) + 1;
  localparam int unsigned NU     = (K > 1) ? K / 2 : 1;   // MAC units
  localparam int unsigned ROOT   = 2 * K - 2;
  localparam int unsigned TOT0   = 2 * K - 1;

  initial begin
    assert ((K & (K - 1)) == 0) else $error("K must be a power of two");
    assert (N_QUBITS >= 1) else $error("N_QUBITS must be at least 1");
  end

  // ---------------- slot plan of a stage ----------------
  // Stage v < LEVELS is tree level v; stage LEVELS is the final product.
  function automatic logic unit_active(logic [VW-1:0] v, int unsigned u);
    if (v == VW'(LEVELS)) return (u == 0);
    return u < (K >> (v + 1));
  endfunction

  function automatic int unsigned slot_left(logic [VW-1:0] v, int unsigned u);
    if (v == VW'(LEVELS)) return ROOT;
    return 2 * K - 2 * (K >> v) + 2 * u + 1;
  endfunction

  function automatic int unsigned slot_right(logic [VW-1:0] v, int unsigned u, logic ts);
    if (v == VW'(LEVELS)) return TOT0 + 32'(ts);
    return 2 * K - 2 * (K >> v) + 2 * u;
  endfunction

  function automatic int unsigned slot_dest(logic [VW-1:0] v, int unsigned u, logic ts);
    if (v == VW'(LEVELS)) return TOT0 + 32'(!ts);
    return 2 * K - 2 * (K >> v) + (K >> v) + u;
  endfunction

  // ---------------- buffers, one per slot ----------------
  logic          ram_we    [SLOTS];
  logic [AW-1:0] ram_waddr [SLOTS];
  cplx_t         ram_wdata [SLOTS];
  logic [AW-1:0] ram_raddr [SLOTS][1];
  cplx_t         ram_rdata [SLOTS][1];

  for (genvar s = 0; s < SLOTS; s++) begin : g_slot
    cplx_ram #(.DEPTH(N * N), .NRD(1)) u_buf (
      .clk, .we(ram_we[s]), .waddr(ram_waddr[s]), .wdata(ram_wdata[s]),
      .raddr(ram_raddr[s]), .rdata(ram_rdata[s])
    );
  end

  // ---------------- issue stage ----------------
  typedef enum logic [0:0] {IDLE, RUN} state_e;
  state_e state;

  logic                tsel;          // which total slot holds M_total
  logic                acc_mode;      // multiply into the old total
  logic [VW-1:0]       stage;
  logic [N_QUBITS-1:0] i, j, k;

  // ---------------- MAC stage ----------------
  logic                v1, first1, last1, final1, ident1, one1;
  logic [VW-1:0]       stage1;
  logic [AW-1:0]       waddr1;
  cplx_t               acc   [NU];
  cplx_t               acc_in[NU];
  cplx_t               a_op  [NU];
  cplx_t               b_op  [NU];
  cplx_t               mac_y [NU];

  wire last_k = (k == N_QUBITS'(N - 1));
  wire last_j = (j == N_QUBITS'(N - 1));
  wire last_i = (i == N_QUBITS'(N - 1));
  wire last_s = (stage == VW'(LEVELS));

  assign busy = (state != IDLE) || v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      tsel     <= 1'b0;
      acc_mode <= 1'b0;
      stage    <= '0;
      i        <= '0;
      j        <= '0;
      k        <= '0;
      v1       <= 1'b0;
      first1   <= 1'b0;
      last1    <= 1'b0;
      final1   <= 1'b0;
      ident1   <= 1'b0;
      one1     <= 1'b0;
      stage1   <= '0;
      waddr1   <= '0;
      for (int u = 0; u < NU; u++) acc[u] <= CPLX_ZERO;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= 1'b0;
      if (state == IDLE) begin
        if (start && !busy) begin
          state    <= RUN;
          acc_mode <= accumulate;
          stage    <= '0;
          i        <= '0;
          j        <= '0;
          k        <= '0;
        end
      end else begin
        v1     <= 1'b1;
        first1 <= (k == '0);
        last1  <= last_k;
        final1 <= last_k && last_j && last_i && last_s;
        ident1 <= last_s && !acc_mode;
        one1   <= (k == j);
        stage1 <= stage;
        waddr1 <= {i, j};
        k      <= k + 1'b1;
        if (last_k) begin
          j <= j + 1'b1;
          if (last_j) begin
            i <= i + 1'b1;
            if (last_i) begin
              stage <= stage + 1'b1;
              if (last_s) state <= IDLE;
            end
          end
        end
      end

      if (v1) begin
        for (int u = 0; u < NU; u++) acc[u] <= mac_y[u];
        if (final1) begin
          tsel <= ~tsel;
          done <= 1'b1;
        end
      end
    end
  end

  // operand routing from the slot buffers to the MAC units
  always_comb begin
    for (int u = 0; u < NU; u++) begin
      acc_in[u] = first1 ? CPLX_ZERO : acc[u];
      a_op[u]   = CPLX_ZERO;
      b_op[u]   = CPLX_ZERO;
      for (int s = 0; s < SLOTS; s++) begin
        if (s == slot_left(stage1, u))      a_op[u] = ram_rdata[s][0];
        if (s == slot_right(stage1, u, tsel)) b_op[u] = ram_rdata[s][0];
      end
      if (ident1) b_op[u] = one1 ? CPLX_ONE : CPLX_ZERO;
    end
  end

  for (genvar u = 0; u < NU; u++) begin : g_mac
    cmac u_cmac (.a(a_op[u]), .b(b_op[u]), .acc(acc_in[u]), .y(mac_y[u]));
  end

  // buffer ports: read addresses from the issue stage, writes from the MAC stage
  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      ram_raddr[s][0] = (s == TOT0 + 32'(tsel)) ? t_raddr : '0;
      ram_we[s]       = m_we && !busy && (s == 32'(m_sel)) && (s < K);
      ram_waddr[s]    = m_addr;
      ram_wdata[s]    = m_wdata;
      if (state == RUN) begin
        for (int u = 0; u < NU; u++) begin
          if (unit_active(stage, u) && s == slot_left(stage, u))
            ram_raddr[s][0] = {i, k};
          if (unit_active(stage, u) && s == slot_right(stage, u, tsel))
            ram_raddr[s][0] = {k, j};
        end
      end
      if (v1 && last1) begin
        for (int u = 0; u < NU; u++) begin
          if (unit_active(stage1, u) && s == slot_dest(stage1, u, tsel)) begin
            ram_we[s]    = 1'b1;
            ram_waddr[s] = waddr1;
            ram_wdata[s] = mac_y[u];
          end
        end
      end
    end
  end

  assign t_rdata = ram_rdata[TOT0 + 32'(tsel)][0];

  a_no_host_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !m_we);

endmodule
