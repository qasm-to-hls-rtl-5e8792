// tb_mv_kernel: self-checking test of the matrix-vector kernel (Type-2 size).
// A 3-qubit kernel with K = 2 matrix buffers is loaded with random complex
// matrices and a random state. Three calls are made: two layers at once, one
// layer with the output of the previous call fed back as its input, and two
// layers on a freshly loaded state. Each output is compared bit for bit with
// a row-by-row model using the same operation order, and the time from start
// to done is checked against n_layers*N*N + 1 clocks. A host write while
// busy is not attempted (the kernel asserts against it).
module tb_mv_kernel;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  localparam int NQ = 3;
  localparam int K  = 2;
  localparam int N  = 1 << NQ;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          m_we = 1'b0, s_we = 1'b0, start = 1'b0;
  logic [0:0]    m_sel = '0;
  logic [2*NQ-1:0] m_addr = '0;
  logic [NQ-1:0] s_addr = '0, s_raddr = '0;
  cplx_t         m_wdata = CPLX_ZERO, s_wdata = CPLX_ZERO, s_rdata;
  logic [1:0]    n_layers = 2'd1;
  logic          busy, done;

  cplx_t mat [K][N][N];
  cplx_t st [N];
  int checks = 0, failures = 0;

  mv_kernel #(.N_QUBITS(NQ), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_matrices();
    for (int k = 0; k < K; k++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          mat[k][r][c] = rand_amp();
          @(negedge clk);
          m_we = 1'b1; m_sel = 1'(k); m_addr = (2*NQ)'(r * N + c); m_wdata = mat[k][r][c];
        end
    @(negedge clk) m_we = 1'b0;
  endtask

  task automatic load_state();
    for (int i = 0; i < N; i++) begin
      st[i] = rand_amp();
      @(negedge clk);
      s_we = 1'b1; s_addr = NQ'(i); s_wdata = st[i];
    end
    @(negedge clk) s_we = 1'b0;
  endtask

  task automatic model(int layers);
    cplx_t nxt [N];
    for (int l = 0; l < layers; l++) begin
      for (int r = 0; r < N; r++) begin
        nxt[r] = CPLX_ZERO;
        for (int c = 0; c < N; c++) nxt[r] = cmac_ref(mat[l][r][c], st[c], nxt[r]);
      end
      st = nxt;
    end
  endtask

  task automatic run(int layers);
    int cyc;
    @(negedge clk);
    start = 1'b1; n_layers = 2'(layers);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != layers * N * N + 1) begin
      failures++;
      $display("FAIL latency: %0d clocks, expected %0d", cyc, layers * N * N + 1);
    end
    model(layers);
    for (int i = 0; i < N; i++) begin
      s_raddr = NQ'(i);
      @(negedge clk);
      checks++;
      if (s_rdata !== st[i]) begin
        failures++;
        $display("FAIL layers=%0d amp %0d: %h expected %h", layers, i, s_rdata, st[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_matrices();
    load_state();
    run(2);
    run(1);          // feeds the previous output back
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    load_state();
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
