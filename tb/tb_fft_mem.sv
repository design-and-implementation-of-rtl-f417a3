// tb_fft_mem: fills a 32-word memory through one port, then performs random
// four-port read/write cycles at distinct addresses, comparing all four read
// ports with a shadow copy kept here.
module tb_fft_mem;
  localparam int D = 32;
  localparam int W = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]          raddr [4], waddr [4];
  logic signed [W-1:0] rr [4], ri [4], wr [4], wi [4];
  logic [3:0]          we;
  logic signed [W-1:0] sh_re [D], sh_im [D];
  int checks = 0, failures = 0;

  fft_mem #(.DEPTH(D), .W(W)) dut (.clk(clk), .raddr(raddr), .rdata_re(rr),
    .rdata_im(ri), .we(we), .waddr(waddr), .wdata_re(wr), .wdata_im(wi));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [D];
    we = '0;
    for (int p = 0; p < 4; p++) begin raddr[p] = 0; waddr[p] = 0; wr[p] = 0; wi[p] = 0; end
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 4'b0001; waddr[0] = 5'(a); wr[0] = W'($urandom); wi[0] = W'($urandom);
      sh_re[a] = wr[0]; sh_im[a] = wi[0];
    end
    @(negedge clk); we = '0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int a = 0; a < D; a++) perm[a] = a;
      perm.shuffle();
      for (int p = 0; p < 4; p++) begin
        raddr[p] = 5'($urandom % D);
        waddr[p] = 5'(perm[p]);
        wr[p] = W'($urandom); wi[p] = W'($urandom);
      end
      we = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rr[p] != sh_re[raddr[p]] || ri[p] != sh_im[raddr[p]]) begin
          failures++;
          $display("read port %0d addr %0d mismatch", p, raddr[p]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (we[p]) begin
        sh_re[waddr[p]] = wr[p]; sh_im[waddr[p]] = wi[p];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
