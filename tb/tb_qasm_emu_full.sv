// tb_qasm_emu_full: end-to-end test of the emulator top at its default size.
//
// Same host program and checks as tb_qasm_emu_top, but with the top
// instantiated without any parameter override: 7 qubits (128 x 128 complex
// layer matrices), one matrix buffer in the Type-1 matrix-vector kernel and
// four in the matrix-matrix kernel. The 9-layer GHZ circuit is padded with
// three identity layers to 12 for the Type-3 path (three matrix-matrix
// calls of 3 x 128^3 clocks each, two 128^3-MAC products running side by side
// in the first tree level), and run layer by layer
// through the Type-1 path (nine calls of 128^2 each). The localparams below
// restate the top's default sizes for the host program.
module tb_qasm_emu_full;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  localparam int NQ  = 7;
  localparam int KMV = 1;
  localparam int KMM = 4;
  localparam int N   = 1 << NQ;
  localparam int L   = NQ + 2;
  localparam int LP  = ((L + KMM - 1) / KMM) * KMM;   // padded for the Type-3 path
  localparam int KWV = (KMV > 1) ? $clog2(KMV) : 1;
  localparam int KWM = (KMM > 1) ? $clog2(KMM) : 1;
  localparam int LWV = $clog2(KMV + 1);

  // matrices are flat (element r*N + c) dynamic arrays so they copy at run time
  typedef cplx_t mat_t [];
  typedef cplx_t vec_t [];

  logic clk = 1'b0, rst_n = 1'b0;
  logic mv_m_we = 0, mv_s_we = 0, mv_start = 0;
  logic [KWV-1:0] mv_m_sel = '0;
  logic [2*NQ-1:0] mv_m_addr = '0;
  cplx_t mv_m_wdata = CPLX_ZERO, mv_s_wdata = CPLX_ZERO, mv_s_rdata;
  logic [NQ-1:0] mv_s_addr = '0, mv_s_raddr = '0;
  logic [LWV-1:0] mv_n_layers = '0;
  logic mv_busy, mv_done;
  logic mm_m_we = 0, mm_start = 0, mm_accumulate = 0;
  logic [KWM-1:0] mm_m_sel = '0;
  logic [2*NQ-1:0] mm_m_addr = '0, mm_t_raddr = '0;
  cplx_t mm_m_wdata = CPLX_ZERO, mm_t_rdata;
  logic mm_busy, mm_done;
  logic t3_m_we = 0, t3_s_we = 0, t3_start = 0;
  logic [2*NQ-1:0] t3_m_addr = '0;
  cplx_t t3_m_wdata = CPLX_ZERO, t3_s_wdata = CPLX_ZERO, t3_s_rdata;
  logic [NQ-1:0] t3_s_addr = '0, t3_s_raddr = '0;
  logic t3_busy, t3_done;

  mat_t layers [LP];
  mat_t total;
  int checks = 0, failures = 0;
  int n_full = 0, n_partial = 0, n_feedback = 0, n_fresh = 0, n_accum = 0, n_transfer = 0;
  int n_concurrent = 0;

  qasm_emu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- circuit layering (host software's job) ----------------
  typedef enum int {G_I, G_H, G_X} gate_e;

  function automatic cplx_t gate_el(gate_e g, int r, int c);
    real h;
    h = 1.0 / $sqrt(2.0);
    case (g)
      G_H:     return cplx_of((r == 1 && c == 1) ? -h : h, 0.0);
      G_X:     return (r != c) ? CPLX_ONE : CPLX_ZERO;
      default: return (r == c) ? CPLX_ONE : CPLX_ZERO;
    endcase
  endfunction

  // Kronecker product of one gate per qubit
  function automatic mat_t single_layer(gate_e g [NQ]);
    mat_t m = new[N * N];
    real re, im, nre;
    cplx_t e;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        re = 1.0; im = 0.0;
        for (int q = 0; q < NQ; q++) begin
          e = gate_el(g[q], (r >> q) & 1, (c >> q) & 1);
          nre = re * r_of(e.re) - im * r_of(e.im);
          im  = re * r_of(e.im) + im * r_of(e.re);
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

  task automatic build_circuit();
    gate_e g [NQ];
    int l = 0;
    for (int q = 0; q < NQ; q++) g[q] = (q == 0) ? G_H : G_I;
    layers[l++] = single_layer(g);
    for (int q = 1; q < NQ; q++) layers[l++] = cnot_layer(q - 1, q);
    for (int q = 0; q < NQ; q++) g[q] = G_X;
    layers[l++] = single_layer(g);
    layers[l++] = single_layer(g);
    for (int q = 0; q < NQ; q++) g[q] = G_I;
    while (l < LP) layers[l++] = single_layer(g);
  endtask

  // ---------------- reference models ----------------
  function automatic vec_t mv_ref(mat_t m, vec_t s);
    vec_t o = new[N];
    for (int r = 0; r < N; r++) begin
      o[r] = CPLX_ZERO;
      for (int c = 0; c < N; c++) o[r] = cmac_ref(m[r * N + c], s[c], o[r]);
    end
    return o;
  endfunction

  function automatic mat_t mm_ref(mat_t a, mat_t b);
    mat_t o = new[N * N];
    cplx_t acc;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = CPLX_ZERO;
        for (int k = 0; k < N; k++) acc = cmac_ref(a[i * N + k], b[k * N + j], acc);
        o[i * N + j] = acc;
      end
    return o;
  endfunction

  function automatic mat_t ident();
    mat_t o = new[N * N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) o[i * N + j] = (i == j) ? CPLX_ONE : CPLX_ZERO;
    return o;
  endfunction

  // the mm_kernel's pairwise tree over layers base .. base+KMM-1
  function automatic mat_t tree_ref(int base);
    mat_t lvl [KMM];
    int cnt = KMM;
    for (int k = 0; k < KMM; k++) lvl[k] = layers[base + k];
    while (cnt > 1) begin
      for (int j = 0; j < cnt / 2; j++) lvl[j] = mm_ref(lvl[2*j + 1], lvl[2*j]);
      cnt = cnt / 2;
    end
    return lvl[0];
  endfunction

  function automatic vec_t zero_state();
    vec_t s = new[N];
    for (int i = 0; i < N; i++) s[i] = (i == 0) ? CPLX_ONE : CPLX_ZERO;
    return s;
  endfunction

  task automatic check_ideal(vec_t s, string path);
    real h;
    cplx_t want;
    h = 1.0 / $sqrt(2.0);
    for (int i = 0; i < N; i++) begin
      want = (i == 0 || i == N - 1) ? cplx_of(h, 0.0) : CPLX_ZERO;
      checks++;
      if (cdist(s[i], want) > 1.0e-12) begin
        failures++;
        $display("FAIL %s ideal amp %0d: %f %fj", path, i, r_of(s[i].re), r_of(s[i].im));
      end
    end
  endtask

  task automatic wait_done(ref logic d, input int expect_cyc, input string what);
    int cyc = 0;
    while (!d) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", what, cyc, expect_cyc);
    end
  endtask

  // ---------------- Type-1 / Type-2 path ----------------
  task automatic run_type2();
    vec_t s;
    int l = 0, batch;
    s = zero_state();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      mv_s_we = 1; mv_s_addr = NQ'(i); mv_s_wdata = s[i];
    end
    @(negedge clk) mv_s_we = 0;
    while (l < L) begin
      batch = (L - l < KMV) ? L - l : KMV;
      for (int k = 0; k < batch; k++)
        for (int e = 0; e < N * N; e++) begin
          @(negedge clk);
          mv_m_we = 1; mv_m_sel = KWV'(k); mv_m_addr = (2*NQ)'(e);
          mv_m_wdata = layers[l + k][e];
        end
      @(negedge clk);
      mv_m_we = 0;
      mv_start = 1; mv_n_layers = LWV'(batch);
      @(negedge clk);
      mv_start = 0;
      wait_done(mv_done, batch * N * N + 1, "mv");
      if (batch == KMV) n_full++; else n_partial++;
      if (l > 0) n_feedback++;
      for (int k = 0; k < batch; k++) s = mv_ref(layers[l + k], s);
      l += batch;
    end
    for (int i = 0; i < N; i++) begin
      mv_s_raddr = NQ'(i);
      @(negedge clk);
      checks++;
      if (mv_s_rdata !== s[i]) begin
        failures++;
        $display("FAIL type2 amp %0d: %h expected %h", i, mv_s_rdata, s[i]);
      end
      s[i] = mv_s_rdata;
    end
    check_ideal(s, "type2");
  endtask

  // ---------------- Type-3 path ----------------
  task automatic run_type3();
    vec_t s;
    cplx_t got;
    for (int base = 0; base < LP; base += KMM) begin
      for (int k = 0; k < KMM; k++)
        for (int e = 0; e < N * N; e++) begin
          @(negedge clk);
          mm_m_we = 1; mm_m_sel = KWM'(k); mm_m_addr = (2*NQ)'(e);
          mm_m_wdata = layers[base + k][e];
        end
      @(negedge clk);
      mm_m_we = 0;
      mm_start = 1; mm_accumulate = (base != 0);
      @(negedge clk);
      mm_start = 0;
      wait_done(mm_done, ($clog2(KMM) + 1) * N * N * N + 1, "mm");
      total = mm_ref(tree_ref(base), (base != 0) ? total : ident());
      if (base == 0) n_fresh++; else n_accum++;
      if (KMM >= 4) n_concurrent++;   // first tree level ran KMM/2 products at once
    end
    // M_total back to the host and on to the matrix-vector kernel
    for (int e = 0; e < N * N; e++) begin
      mm_t_raddr = (2*NQ)'(e);
      @(negedge clk);
      got = mm_t_rdata;
      checks++;
      if (got !== total[e]) begin
        failures++;
        $display("FAIL M_total element %0d: %h expected %h", e, got, total[e]);
      end
      t3_m_we = 1; t3_m_addr = (2*NQ)'(e); t3_m_wdata = got;
      @(negedge clk);
      t3_m_we = 0;
    end
    n_transfer++;
    s = zero_state();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      t3_s_we = 1; t3_s_addr = NQ'(i); t3_s_wdata = s[i];
    end
    @(negedge clk);
    t3_s_we = 0;
    t3_start = 1;
    @(negedge clk);
    t3_start = 0;
    wait_done(t3_done, N * N + 1, "t3");
    s = mv_ref(total, s);
    for (int i = 0; i < N; i++) begin
      t3_s_raddr = NQ'(i);
      @(negedge clk);
      checks++;
      if (t3_s_rdata !== s[i]) begin
        failures++;
        $display("FAIL type3 amp %0d: %h expected %h", i, t3_s_rdata, s[i]);
      end
      s[i] = t3_s_rdata;
    end
    check_ideal(s, "type3");
  endtask

  task automatic need(int count, string what, bit applies);
    $display("mechanism %-24s %0d", what, count);
    if (applies) begin
      checks++;
      if (count == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", what);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    build_circuit();
    run_type2();
    run_type3();
    need(n_full, "full batch", 1);
    need(n_partial, "partial batch", (KMV > 1) && (L % KMV != 0));
    need(n_feedback, "state feedback", 1);
    need(n_fresh, "fresh M_total", 1);
    need(n_accum, "accumulated M_total", LP > KMM);
    need(n_transfer, "M_total transfer", 1);
    need(n_concurrent, "concurrent tree products", KMM >= 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
