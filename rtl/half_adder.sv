// half_adder -- 1-bit half adder: a + b = 2*co + s.
// Used in the exact part of the multiplier's reduction tree. Purely
// combinational.
module half_adder (
    input  logic a,
    input  logic b,
    output logic s,
    output logic co
);
    always_comb begin
        s  = a ^ b;
        co = a & b;
    end
endmodule
