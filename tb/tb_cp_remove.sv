// tb_cp_remove: cyclic-prefix removal at N = 8, CP = 2. A random stream with
// pauses enters; of every 10 samples the first 2 must be dropped and the other
// 8 passed on unchanged one cycle later, out_sof on the first of them.
module tb_cp_remove;
  localparam int N = 8;
  localparam int CP = 2;
  localparam int W = 16;
  localparam int NS = 12 * (N + CP);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid, out_sof;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;

  cp_remove #(.N(N), .W(W), .CP(CP)) dut (.clk, .rst_n, .in_valid, .in_re, .in_im,
                                          .out_valid, .out_re, .out_im, .out_sof);

  logic [W-1:0] xr [NS], xi [NS];
  int keep [$];
  int checks = 0, failures = 0, nout = 0;

  initial begin
    for (int i = 0; i < NS; i++) begin
      xr[i] = W'($urandom); xi[i] = W'($urandom);
      if (i % (N + CP) >= CP) keep.push_back(i);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      while ($urandom_range(3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; in_re <= xr[i]; in_im <= xi[i];
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != (i % (N + CP) >= CP) || out_sof != (i % (N + CP) == CP)) begin
        failures++;
        $display("sample %0d: valid=%b sof=%b", i, out_valid, out_sof);
      end
      if (out_valid) begin
        checks++;
        if (out_re != xr[keep[nout]] || out_im != xi[keep[nout]]) begin
          failures++;
          $display("output %0d wrong", nout);
        end
        nout++;
      end
    end
    in_valid <= 0;
    @(posedge clk);
    checks++;
    if (nout != 12 * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 6 + 200) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
