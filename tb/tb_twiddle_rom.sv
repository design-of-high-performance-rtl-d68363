// tb_twiddle_rom: reads every entry of the default 256-entry twiddle table and
// compares it with cos(2*pi*e/L) and -sin(2*pi*e/L) scaled by 2**14; each part
// must be within one LSB, and data must appear one cycle after the address.
module tb_twiddle_rom;
  localparam int L = 256;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] addr = 0;
  logic signed [TW-1:0] tw_re, tw_im;
  int checks = 0, failures = 0;

  twiddle_rom dut (.clk, .addr, .tw_re, .tw_im);

  initial begin
    for (int e = 0; e < L; e++) begin
      real cr, ci;
      addr <= 8'(e);
      @(posedge clk);
      #1;
      cr = $cos(2.0 * PI * e / L) * 16384.0;
      ci = -$sin(2.0 * PI * e / L) * 16384.0;
      checks++;
      if (rabs(real'(tw_re) - cr) > 1.0 || rabs(real'(tw_im) - ci) > 1.0) begin
        failures++;
        if (failures < 8) $display("e=%0d got (%0d,%0d) expected (%f,%f)", e, tw_re, tw_im, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
