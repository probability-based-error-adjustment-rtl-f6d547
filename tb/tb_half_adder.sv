// tb_half_adder -- exhaustive self-checking test: 2*co + s must equal a + b
// for all four input combinations.
module tb_half_adder;
    logic a, b, s, co;
    int checks = 0, failures = 0;

    half_adder dut (.a(a), .b(b), .s(s), .co(co));

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int v = 0; v < 4; v++) begin
            {a, b} = v[1:0];
            #1;
            checks++;
            if (2 * co + s != a + b) begin
                failures++;
                $display("FAIL a=%b b=%b: co=%b s=%b", a, b, co, s);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
