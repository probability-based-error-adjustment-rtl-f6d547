// rca -- ripple-carry adder for the multiplier's final addition.
//
// Adds two WIDTH-bit rows and returns the WIDTH+1-bit sum, carry out in the
// top bit. A chain of full_adder cells with the carry in of bit 0 tied to 0;
// the delay grows linearly with WIDTH. The default of 11 is the span of
// columns 4..14 left as two rows by the 8x8 multiplier; the sum is product
// bits 15..4. Purely combinational.
module rca #(
    parameter int unsigned WIDTH = 11
) (
    input  logic [WIDTH-1:0] a,
    input  logic [WIDTH-1:0] b,
    output logic [WIDTH:0]   sum
);
    logic [WIDTH:0] c;

    assign c[0] = 1'b0;

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
        full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
    end

    assign sum[WIDTH] = c[WIDTH];
endmodule
