// esposito_c42 -- approximate 4-2 compressor with two outputs of equal weight.
//
// Both outputs W1 and W2 carry the weight of the inputs, so W1+W2 (0..2)
// stands for the number of ones among p1..p4:
//   W2 = (p1 | p2) | (p3 & p4)
//   W1 = (p3 | p4) | (p1 & p2)
// The count is exact for up to two ones; three ones give 2 (error -1) and
// four ones give 2 (error -2). No XOR gate is needed. Used directly on raw
// partial products, where a one has probability 1/4, so the erroneous
// patterns are rare (13/256).
//
// The truth table is the one published for this compressor; the equations
// are read from it. Port packing p[0] = p1 ... p[3] = p4 is this
// implementation's choice. Purely combinational.
module esposito_c42 (
    input  logic [3:0] p,
    output logic       w1,
    output logic       w2
);
    always_comb begin
        w2 = (p[0] | p[1]) | (p[2] & p[3]);
        w1 = (p[2] | p[3]) | (p[0] & p[1]);
    end
endmodule
