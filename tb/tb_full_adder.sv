// tb_full_adder -- exhaustive self-checking test: 2*co + s must equal
// a + b + ci for all eight input combinations.
module tb_full_adder;
    logic a, b, ci, s, co;
    int checks = 0, failures = 0;

    full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int v = 0; v < 8; v++) begin
            {a, b, ci} = v[2:0];
            #1;
            checks++;
            if (2 * co + s != a + b + ci) begin
                failures++;
                $display("FAIL a=%b b=%b ci=%b: co=%b s=%b", a, b, ci, co, s);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
