// full_adder -- 1-bit full adder: a + b + ci = 2*co + s.
// Standard cell of the exact part of the multiplier's reduction tree and of
// its final ripple-carry adder. Purely combinational.
module full_adder (
    input  logic a,
    input  logic b,
    input  logic ci,
    output logic s,
    output logic co
);
    always_comb begin
        s  = a ^ b ^ ci;
        co = (a & b) | (ci & (a ^ b));
    end
endmodule
