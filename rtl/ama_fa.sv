// ama_fa: approximate mirror adder, one of five variants AMA1 .. AMA5.
//
// Each variant is a full adder whose transistor-level mirror circuit has been
// simplified, so that its truth table differs from an exact full adder in a
// few of the eight input cases. At logic level the five variants are
// (a, b, cin in; sum, cout out):
//
//   AMA1  cout = b | (a & cin)           sum = cin & ((a & b) | ~cout)
//         wrong in cases abc = 010 (sum and cout) and 100 (sum)
//   AMA2  cout = majority(a, b, cin)     sum = ~cout
//         wrong in cases 000 and 111 (sum)
//   AMA3  cout = b | (a & cin)           sum = ~cout
//         wrong in cases 000, 111 (sum) and 010 (sum and cout)
//   AMA4  cout = a                       sum = cin & (~a | b)
//         wrong in cases 010 (sum), 011 and 100 (sum and cout)
//   AMA5  cout = a                       sum = b
//         wrong in cases 001, 110 (sum), 011 and 100 (sum and cout)
//
// These are the standard approximate mirror adders of Gupta et al. (IEEE
// TCAD, 2013), written here as logic equations rather than transistors.
// Because the variants are not symmetric in a, b and cin, the error of a
// squarer built from them depends on which signal drives which port; the
// adder array documents its choice.
//
// Parameter KIND selects the variant (FA_AMA1 .. FA_AMA5). Purely
// combinational.
module ama_fa #(
  parameter aas_pkg::fa_kind_e KIND = aas_pkg::FA_AMA1
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  import aas_pkg::*;

  initial begin
    assert (KIND != FA_EXACT)
      else $error("ama_fa: KIND must be one of FA_AMA1 .. FA_AMA5");
  end

  always_comb begin
    unique case (KIND)
      FA_AMA1: begin
        cout = b | (a & cin);
        sum  = cin & ((a & b) | ~cout);
      end
      FA_AMA2: begin
        cout = (a & b) | (a & cin) | (b & cin);
        sum  = ~cout;
      end
      FA_AMA3: begin
        cout = b | (a & cin);
        sum  = ~cout;
      end
      FA_AMA4: begin
        cout = a;
        sum  = cin & (~a | b);
      end
      default: begin  // FA_AMA5
        cout = a;
        sum  = b;
      end
    endcase
  end

endmodule
