// Leading zero / leading one counter.
//
// Counts how many bits, from the most significant end, equal the selected value (zero,
// or one when ones is set) before the first differing bit; an operand of all such bits
// gives XLEN. Combinational, used in EX as a DSP support unit (normalisation).
//
// The unit is part of the source design; its internal structure (a priority scan) is this
// implementation's.
module ae32_lzoc #(
  parameter int unsigned XLEN = 32,
  localparam int unsigned CW  = $clog2(XLEN + 1)
) (
  input  logic [XLEN-1:0] a,
  input  logic            ones,
  output logic [CW-1:0]   count
);
  logic [XLEN-1:0] v;
  logic            done;

  always_comb begin
    v     = ones ? ~a : a;
    count = CW'(XLEN);
    done  = 1'b0;
    for (int i = XLEN - 1; i >= 0; i--) begin
      if (!done && v[i]) begin
        count = CW'(XLEN - 1 - i);
        done  = 1'b1;
      end
    end
  end
endmodule
