// tb_exact_c42 -- exhaustive self-checking test of the exact 4-2 compressor.
// For all 32 input combinations sum + 2*(carry+cout) must equal the number
// of ones, and cout must not change with cin.
module tb_exact_c42;
    logic [3:0] x;
    logic       cin, sum, carry, cout;
    int checks = 0, failures = 0;

    exact_c42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int v = 0; v < 16; v++) begin
            logic cout0;
            for (int ci = 0; ci < 2; ci++) begin
                x   = v[3:0];
                cin = ci[0];
                #1;
                checks++;
                if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + ci) begin
                    failures++;
                    $display("FAIL x=%4b cin=%0d: sum=%b carry=%b cout=%b", x, ci, sum, carry, cout);
                end
                if (ci == 0) cout0 = cout;
                else begin
                    checks++;
                    if (cout !== cout0) begin
                        failures++;
                        $display("FAIL x=%4b: cout depends on cin", x);
                    end
                end
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
