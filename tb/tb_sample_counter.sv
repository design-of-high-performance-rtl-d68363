// tb_sample_counter: checks the stage counter against a software count under a
// random enable: count value, the all-ones wrap flag and the sticky first_wrap.
module tb_sample_counter;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [2:0] count;
  logic wrap, first_wrap;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  sample_counter #(.W(3)) dut (.clk, .rst_n, .en, .count, .wrap, .first_wrap);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      en <= 1'($urandom_range(1));
      @(posedge clk);
      #1;
      if (en) model++;
      checks++;
      if (count != 3'(model) || wrap != (model % 8 == 7) || first_wrap != (model >= 8)) begin
        failures++;
        $display("step %0d: count=%0d wrap=%b first=%b model=%0d", i, count, wrap, first_wrap, model);
      end
      if (wrap && en) wraps++;
    end
    checks++;
    if (model < 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
