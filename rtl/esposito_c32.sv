// esposito_c32 -- approximate 3-2 compressor with two outputs of equal weight.
//
// Three inputs of one column become two outputs of that same weight:
//   W1 = x1 | x2
//   W2 = x3 | (x1 & x2)
// W1+W2 equals the number of ones except for 111, which gives 2. With two or
// more ones both outputs are 1. For inputs that are 1 with probability 1/4
// the outputs are 0 with probability 36/64 (W1) and 45/64 (W2), which is
// what the error-probability analysis of the multiplier relies on.
//
// Only the behaviour (two or more ones give 11) and the two output
// probabilities are published; these equations are the simplest that meet
// both and are this implementation's choice. Purely combinational.
module esposito_c32 (
    input  logic [2:0] x,   // x[0]=x1, x[1]=x2, x[2]=x3
    output logic       w1,
    output logic       w2
);
    always_comb begin
        w1 = x[0] | x[1];
        w2 = x[2] | (x[0] & x[1]);
    end
endmodule
