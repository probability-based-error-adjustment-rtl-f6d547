// exact_c42 -- exact 4-2 compressor.
//
// x1+x2+x3+x4+cin = sum + 2*(carry + cout). It is the usual pair of cascaded
// full adders: the first adds x1..x3 and produces cout, the second adds its
// sum, x4 and cin. cout does not depend on cin, so a row of these
// compressors, each cin fed by the cout of the next lower column, has no
// rippling carry chain. sum stays in the column; carry and cout go one
// column up. Purely combinational.
module exact_c42 (
    input  logic [3:0] x,
    input  logic       cin,
    output logic       sum,
    output logic       carry,
    output logic       cout
);
    logic s1;

    full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),  .co(cout));
    full_adder u_fa2 (.a(s1),   .b(x[3]), .ci(cin),  .s(sum), .co(carry));
endmodule
