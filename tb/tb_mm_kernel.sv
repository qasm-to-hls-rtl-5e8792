// tb_mm_kernel: self-checking test of the matrix-matrix kernel (Type-3).
// A 2-qubit kernel with K = 4 input buffers is loaded with random complex
// matrices. The first call (accumulate low) must leave
// M_total = (M3*M2)*(M1*M0); a second call with new matrices and accumulate
// high must leave M_total = ((M3'*M2')*(M1'*M0')) * M_total. The model uses the
// same pairwise tree and accumulation order, so results are compared bit for
// bit; the time from start to done is checked against (log2(K) + 1)*N^3 + 1
// clocks: the two products of the first level run concurrently.
module tb_mm_kernel;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  localparam int NQ = 2;
  localparam int K  = 4;
  localparam int N  = 1 << NQ;

  typedef cplx_t mat_t [N][N];

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          m_we = 1'b0, start = 1'b0, accumulate = 1'b0;
  logic [1:0]    m_sel = '0;
  logic [2*NQ-1:0] m_addr = '0, t_raddr = '0;
  cplx_t         m_wdata = CPLX_ZERO, t_rdata;
  logic          busy, done;

  mat_t mats [K];
  mat_t total;
  int checks = 0, failures = 0;

  mm_kernel #(.N_QUBITS(NQ), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mat_t matmul(mat_t a, mat_t b);
    mat_t c;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        c[i][j] = CPLX_ZERO;
        for (int k = 0; k < N; k++) c[i][j] = cmac_ref(a[i][k], b[k][j], c[i][j]);
      end
    return c;
  endfunction

  function automatic mat_t ident();
    mat_t c;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) c[i][j] = (i == j) ? CPLX_ONE : CPLX_ZERO;
    return c;
  endfunction

  task automatic load();
    for (int k = 0; k < K; k++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          mats[k][r][c] = rand_amp();
          @(negedge clk);
          m_we = 1'b1; m_sel = 2'(k); m_addr = (2*NQ)'(r * N + c); m_wdata = mats[k][r][c];
        end
    @(negedge clk) m_we = 1'b0;
  endtask

  task automatic run(logic acc_mode);
    int cyc;
    mat_t root;
    @(negedge clk);
    start = 1'b1; accumulate = acc_mode;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != ($clog2(K) + 1) * N * N * N + 1) begin
      failures++;
      $display("FAIL latency: %0d clocks, expected %0d", cyc, ($clog2(K) + 1) * N * N * N + 1);
    end
    root  = matmul(matmul(mats[3], mats[2]), matmul(mats[1], mats[0]));
    total = matmul(root, acc_mode ? total : ident());
    for (int i = 0; i < N * N; i++) begin
      t_raddr = (2*NQ)'(i);
      @(negedge clk);
      checks++;
      if (t_rdata !== total[i / N][i % N]) begin
        failures++;
        $display("FAIL acc=%0d element %0d: %h expected %h", acc_mode, i, t_rdata,
                 total[i / N][i % N]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load();
    run(1'b0);
    load();
    run(1'b1);
    load();
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
