// tb_workload_random: random constant-depth circuits of 3, 5 and 7 qubits on
// the default (7-qubit, Type-1) build.
//
// For each circuit size the testbench, acting as host software, draws a
// random circuit of DEPTH layers. A layer is either one random single-qubit
// gate (I, H, X, Z, S or T) on every active qubit, or one CNOT between two
// random active qubits standing alone as a layer. Qubits above the circuit's
// size stay idle (identity), so a smaller circuit runs on the 7-qubit kernel
// unchanged. Each layer matrix is the Kronecker product of its gates (qubit q
// on bit q of the basis index). The layers go one per call to the Type-1
// matrix-vector kernel, starting from |0...0>. The final state is compared
// bit for bit with a model in the hardware's operation order, and within
// 1e-9 with an independent gate-by-gate state-vector simulation that never
// forms a layer matrix. Every call's latency (N*N + 1 clocks) is checked.
module tb_workload_random;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  localparam int NQ    = 7;       // the top's default size
  localparam int N     = 1 << NQ;
  localparam int DEPTH = 8;

  typedef cplx_t mat_t [];
  typedef cplx_t vec_t [];
  typedef enum int {G_I, G_H, G_X, G_Z, G_S, G_T} gate_e;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mv_m_we = 0, mv_s_we = 0, mv_start = 0;
  logic [0:0] mv_m_sel = '0;
  logic [2*NQ-1:0] mv_m_addr = '0;
  cplx_t mv_m_wdata = CPLX_ZERO, mv_s_wdata = CPLX_ZERO, mv_s_rdata;
  logic [NQ-1:0] mv_s_addr = '0, mv_s_raddr = '0;
  logic [0:0] mv_n_layers = 1'b1;
  logic mv_busy, mv_done;
  logic mm_m_we = 0, mm_start = 0, mm_accumulate = 0;
  logic [1:0] mm_m_sel = '0;
  logic [2*NQ-1:0] mm_m_addr = '0, mm_t_raddr = '0;
  cplx_t mm_m_wdata = CPLX_ZERO, mm_t_rdata;
  logic mm_busy, mm_done;
  logic t3_m_we = 0, t3_s_we = 0, t3_start = 0;
  logic [2*NQ-1:0] t3_m_addr = '0;
  cplx_t t3_m_wdata = CPLX_ZERO, t3_s_wdata = CPLX_ZERO, t3_s_rdata;
  logic [NQ-1:0] t3_s_addr = '0, t3_s_raddr = '0;
  logic t3_busy, t3_done;

  int checks = 0, failures = 0;

  qasm_emu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 2x2 gate element as (re, im)
  function automatic void gate_el(gate_e g, int r, int c, output real re, output real im);
    real h;
    h = 1.0 / $sqrt(2.0);
    re = 0.0; im = 0.0;
    case (g)
      G_H: re = (r == 1 && c == 1) ? -h : h;
      G_X: re = (r != c) ? 1.0 : 0.0;
      G_Z: re = (r != c) ? 0.0 : ((r == 1) ? -1.0 : 1.0);
      G_S: if (r == c) begin if (r == 1) im = 1.0; else re = 1.0; end
      G_T: if (r == c) begin if (r == 1) begin re = h; im = h; end else re = 1.0; end
      default: re = (r == c) ? 1.0 : 0.0;
    endcase
  endfunction

  function automatic mat_t single_layer(gate_e g [NQ]);
    mat_t m = new[N * N];
    real re, im, nre, gre, gim;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        re = 1.0; im = 0.0;
        for (int q = 0; q < NQ; q++) begin
          gate_el(g[q], (r >> q) & 1, (c >> q) & 1, gre, gim);
          nre = re * gre - im * gim;
          im  = re * gim + im * gre;
          re  = nre;
        end
        m[r * N + c] = cplx_of(re, im);
      end
    return m;
  endfunction

  function automatic mat_t cnot_layer(int ctl, int tgt);
    mat_t m = new[N * N];
    int img;
    for (int e = 0; e < N * N; e++) m[e] = CPLX_ZERO;
    for (int c = 0; c < N; c++) begin
      img = ((c >> ctl) & 1) ? (c ^ (1 << tgt)) : c;
      m[img * N + c] = CPLX_ONE;
    end
    return m;
  endfunction

  function automatic vec_t mv_ref(mat_t m, vec_t s);
    vec_t o = new[N];
    for (int r = 0; r < N; r++) begin
      o[r] = CPLX_ZERO;
      for (int c = 0; c < N; c++) o[r] = cmac_ref(m[r * N + c], s[c], o[r]);
    end
    return o;
  endfunction

  // independent state-vector simulation
  real ire [N], iim [N];

  task automatic ideal_gate(gate_e g, int q);
    real a0r, a0i, a1r, a1i, m00r, m00i, m01r, m01i, m10r, m10i, m11r, m11i;
    gate_el(g, 0, 0, m00r, m00i); gate_el(g, 0, 1, m01r, m01i);
    gate_el(g, 1, 0, m10r, m10i); gate_el(g, 1, 1, m11r, m11i);
    for (int i = 0; i < N; i++)
      if (((i >> q) & 1) == 0) begin
        a0r = ire[i]; a0i = iim[i]; a1r = ire[i | (1 << q)]; a1i = iim[i | (1 << q)];
        ire[i] = m00r * a0r - m00i * a0i + m01r * a1r - m01i * a1i;
        iim[i] = m00r * a0i + m00i * a0r + m01r * a1i + m01i * a1r;
        ire[i | (1 << q)] = m10r * a0r - m10i * a0i + m11r * a1r - m11i * a1i;
        iim[i | (1 << q)] = m10r * a0i + m10i * a0r + m11r * a1i + m11i * a1r;
      end
  endtask

  task automatic ideal_cnot(int ctl, int tgt);
    real tr, ti;
    for (int i = 0; i < N; i++)
      if (((i >> ctl) & 1) == 1 && ((i >> tgt) & 1) == 0) begin
        tr = ire[i]; ti = iim[i];
        ire[i] = ire[i | (1 << tgt)]; iim[i] = iim[i | (1 << tgt)];
        ire[i | (1 << tgt)] = tr; iim[i | (1 << tgt)] = ti;
      end
  endtask

  task automatic run_circuit(int nq);
    vec_t s = new[N];
    mat_t m;
    gate_e g [NQ];
    int ctl, tgt, cyc, n_cnot = 0;
    for (int i = 0; i < N; i++) begin
      s[i] = (i == 0) ? CPLX_ONE : CPLX_ZERO;
      ire[i] = (i == 0) ? 1.0 : 0.0;
      iim[i] = 0.0;
      @(negedge clk);
      mv_s_we = 1; mv_s_addr = NQ'(i); mv_s_wdata = s[i];
    end
    @(negedge clk) mv_s_we = 0;
    for (int l = 0; l < DEPTH; l++) begin
      if (l % 3 == 2) begin
        ctl = $urandom_range(0, nq - 1);
        tgt = (ctl + 1 + $urandom_range(0, nq - 2)) % nq;
        m = cnot_layer(ctl, tgt);
        ideal_cnot(ctl, tgt);
        n_cnot++;
      end else begin
        for (int q = 0; q < NQ; q++) begin
          g[q] = (q < nq) ? gate_e'($urandom_range(0, 5)) : G_I;
          if (l == 0 && q < nq) g[q] = G_H;     // start from a superposition
          ideal_gate(g[q], q);
        end
        m = single_layer(g);
      end
      for (int e = 0; e < N * N; e++) begin
        @(negedge clk);
        mv_m_we = 1; mv_m_addr = (2*NQ)'(e); mv_m_wdata = m[e];
      end
      @(negedge clk);
      mv_m_we = 0;
      mv_start = 1;
      @(negedge clk);
      mv_start = 0;
      cyc = 0;
      while (!mv_done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != N * N + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc);
      end
      s = mv_ref(m, s);
    end
    for (int i = 0; i < N; i++) begin
      mv_s_raddr = NQ'(i);
      @(negedge clk);
      checks++;
      if (mv_s_rdata !== s[i]) begin
        failures++;
        $display("FAIL %0d qubits amp %0d: %h expected %h", nq, i, mv_s_rdata, s[i]);
      end
      checks++;
      if (cdist(mv_s_rdata, cplx_of(ire[i], iim[i])) > 1.0e-9) begin
        failures++;
        $display("FAIL %0d qubits amp %0d vs ideal", nq, i);
      end
    end
    $display("%0d-qubit circuit: %0d layers (%0d CNOT layers) done", nq, DEPTH, n_cnot);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_circuit(3);
    run_circuit(5);
    run_circuit(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
