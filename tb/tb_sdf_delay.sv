// tb_sdf_delay: checks that the feedback buffer returns each word exactly D
// enabled cycles after it was written, with a random enable, for D = 5 and D = 1.
module tb_sdf_delay;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [7:0] din, dout5, dout1;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  sdf_delay #(.W(8), .D(5)) dut5 (.clk, .rst_n, .en, .din, .dout(dout5));
  sdf_delay #(.W(8), .D(1)) dut1 (.clk, .rst_n, .en, .din, .dout(dout1));

  initial begin
    din = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      en  <= 1'($urandom_range(3) != 0);
      din <= 8'($urandom);
      #1;
      if (en) begin
        int n;
        n = hist.size();
        if (n >= 5) begin
          checks++;
          if (dout5 != hist[n-5]) begin failures++; $display("D=5: got %h expected %h", dout5, hist[n-5]); end
        end
        if (n >= 1) begin
          checks++;
          if (dout1 != hist[n-1]) begin failures++; $display("D=1: got %h expected %h", dout1, hist[n-1]); end
        end
        hist.push_back(din);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
