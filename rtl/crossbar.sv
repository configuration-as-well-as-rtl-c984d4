// crossbar: N_IN x N_OUT combinational crossbar.
//
// Each output is an AND-OR selector: every input word is ANDed with the
// result of comparing that output's select code against the input's index,
// and the products are ORed together. This is the structure of the published
// crossbar schematic (five inputs in0..in4, compare terms per output, word
// bits up to 53, hence the 54-bit default width). An output whose select is
// disabled drives zero. The select encoding (index plus enable) is this
// design's choice.
//
// Timing: purely combinational.
module crossbar #(
  parameter int unsigned N_IN  = 5,
  parameter int unsigned N_OUT = 5,
  parameter int unsigned W     = 54
) (
  input  logic [N_IN-1:0][W-1:0]           in_data,
  input  logic [N_OUT-1:0][$clog2(N_IN)-1:0] sel,
  input  logic [N_OUT-1:0]                 sel_en,
  output logic [N_OUT-1:0][W-1:0]          out_data
);
  always_comb begin
    for (int unsigned o = 0; o < N_OUT; o++) begin
      out_data[o] = '0;
      for (int unsigned i = 0; i < N_IN; i++) begin
        // cmp_eq term: this output selects input i
        out_data[o] |= in_data[i] & {W{sel_en[o] && (int'(sel[o]) == int'(i))}};
      end
    end
  end
endmodule
