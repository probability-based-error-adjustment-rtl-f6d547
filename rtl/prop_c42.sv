// prop_c42 -- area-efficient approximate 4-2 compressor.
//
// Four inputs of one column weight are compressed into a carry C (weight 2)
// and a sum S (weight 1) using four gates:
//   C = P1 | P2
//   S = NOR( P1 ^ P2 , NOR(P3, P4) )  =  (P1 xnor P2) & (P3 | P4)
// The value 2C+S equals P1+P2+P3+P4 in ten of the sixteen input patterns.
// It is one too large for 0100 and 1000 (a single one in P1 or P2) and one
// too small whenever P3 = P4 = 1 (0011, 0111, 1011, 1111). Because every
// negative error has P3 & P4 set, a single AND gate on P3/P4 flags all of
// them; the multiplier uses that for error correction. The compressor is
// meant for inputs that are more likely to be 1 than raw partial products
// (it is placed after a first compression level).
//
// The gate structure and equations follow the published compressor; the
// port packing (p[0] = P1 ... p[3] = P4) is this implementation's choice.
// Purely combinational, no clock.
module prop_c42 (
    input  logic [3:0] p,   // p[0]=P1, p[1]=P2, p[2]=P3, p[3]=P4
    output logic       s,   // sum, same weight as the inputs
    output logic       c    // carry, next higher weight
);
    logic nor34;
    logic xor12;

    always_comb begin
        nor34 = ~(p[3] | p[2]);
        xor12 = p[1] ^ p[0];
        s     = ~(nor34 | xor12);
        c     = p[1] | p[0];
    end
endmodule
