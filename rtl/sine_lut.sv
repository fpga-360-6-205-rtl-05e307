// sine_lut: sine of a 12-bit angle as a binary32 float, 2-cycle latency.
//
// Angles are encoded so that 0x400 is 90 degrees, 0x800 180 and 0xC00 270.
// A read-only table (sine_table.hex) holds sin(i * 90 / 1024 degrees) for
// i = 0..1023, i.e. the first quadrant, as floats; entry i is the binary32
// rounding of sin(i * pi / 2048). The two top angle bits pick the quadrant:
// in the second and fourth quadrants the table is read at 0x400 - k (the
// cosine of the remaining angle), with k = 0 giving exactly 1.0, and in the
// third and fourth the sign bit is set. Cycle 1 reads the table (registered,
// block-RAM style); cycle 2 applies the quadrant. Cosine is obtained by
// adding 0x400 to the angle.
module sine_lut (
  input  logic        clk,
  input  logic [11:0] angle,
  output logic [31:0] sine
);
  logic [31:0] rom [1024];
  initial $readmemh("rtl/sine_table.hex", rom);

  logic [9:0]  k, addr;
  logic [31:0] rd;
  logic        one_q, neg_q;

  assign k    = angle[9:0];
  assign addr = angle[10] ? 10'(11'h400 - {1'b0, k}) : k;

  always_ff @(posedge clk) begin
    rd    <= rom[addr];
    one_q <= angle[10] && (k == 10'd0);
    neg_q <= angle[11];
    sine  <= {neg_q, one_q ? 31'h3F80_0000 : rd[30:0]};
  end
endmodule
