// sdf_delay: delay-feedback buffer of a single-path delay-feedback butterfly.
// It delays its input by exactly D enabled clock cycles: a word written while
// `en` is high reappears on `dout` D enables later. It is built as a circular
// buffer of D words with one pointer; the word under the pointer is read and
// then overwritten in the same cycle, which gives the D-sample delay with a
// single-port style memory instead of a D-stage shift register (the published architecture
// describes a shift register; the circular buffer is this implementation's
// equivalent). Contents are not reset: the butterflies ignore what comes out
// before D words have been written.
// Interface: din/dout are W bits wide; dout is combinational from the memory.
module sdf_delay #(
  parameter int unsigned W = 33,
  parameter int unsigned D = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;

  logic [W-1:0]  mem [D];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end
endmodule
