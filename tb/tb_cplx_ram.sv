// tb_cplx_ram: self-checking test of the complex word buffer.
// Fills a 64-word, two-read-port buffer with random words, then reads random
// addresses on both ports and checks the one-clock read latency against a
// shadow copy; it also checks that a read of the word being written returns
// the old contents.
module tb_cplx_ram;
  import qemu_pkg::*;
  import qemu_tb_pkg::*;

  localparam int DEPTH = 64;

  logic        clk = 1'b0;
  logic        we;
  logic [5:0]  waddr;
  cplx_t       wdata;
  logic [5:0]  raddr [2];
  cplx_t       rdata [2];
  cplx_t       shadow [DEPTH];
  int checks = 0, failures = 0;

  cplx_ram #(.DEPTH(DEPTH), .NRD(2)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = CPLX_ZERO; raddr[0] = '0; raddr[1] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(i); wdata = rand_amp();
      shadow[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      raddr[0] = 6'($urandom_range(0, DEPTH - 1));
      raddr[1] = 6'($urandom_range(0, DEPTH - 1));
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] !== shadow[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d", p, raddr[p]);
        end
      end
      @(negedge clk);
    end
    // read during write: old data on the read port, new data afterwards
    @(negedge clk);
    we = 1'b1; waddr = 6'd17; wdata = rand_amp(); raddr[0] = 6'd17; raddr[1] = 6'd17;
    @(posedge clk); #1;
    checks++;
    if (rdata[0] !== shadow[17]) begin failures++; $display("FAIL read-during-write"); end
    shadow[17] = wdata;
    @(negedge clk);
    we = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (rdata[1] !== shadow[17]) begin failures++; $display("FAIL write then read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
