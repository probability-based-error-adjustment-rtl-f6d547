// tb_prop_c42 -- exhaustive self-checking test of the approximate 4-2
// compressor. For all 16 input patterns it compares {C,S} with the published
// truth table (held here as a 16-entry constant) and checks the error
// value 2C+S - popcount against the rule: +1 for a single one in P1 or P2,
// -1 whenever P3 = P4 = 1, 0 otherwise. Ends with the TB_RESULT line.
module tb_prop_c42;
    logic [3:0] p;
    logic       s, c;
    int checks = 0, failures = 0;

    prop_c42 dut (.p(p), .s(s), .c(c));

    // Expected {C,S} indexed by the pattern string P1P2P3P4 read as a number
    // (P1 is the leftmost character).
    localparam logic [1:0] EXP [16] = '{2'b00, 2'b01, 2'b01, 2'b01,
                                        2'b10, 2'b10, 2'b10, 2'b10,
                                        2'b10, 2'b10, 2'b10, 2'b10,
                                        2'b10, 2'b11, 2'b11, 2'b11};

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int pat = 0; pat < 16; pat++) begin
            int exact, approx, err, want_err;
            // pattern string P1 P2 P3 P4 -> port bits p[0]..p[3]
            p = {pat[0], pat[1], pat[2], pat[3]};
            #1;
            checks++;
            if ({c, s} !== EXP[pat]) begin
                failures++;
                $display("FAIL pattern %4b: CS=%b%b expected %2b", pat[3:0], c, s, EXP[pat]);
            end
            exact    = $countones(p);
            approx   = 2 * c + s;
            err      = approx - exact;
            want_err = (p[2] & p[3]) ? -1 : ((p[1:0] != 2'b00 && p[0] != p[1] && p[3:2] == 2'b00) ? 1 : 0);
            checks++;
            if (err != want_err) begin
                failures++;
                $display("FAIL pattern %4b: error %0d expected %0d", pat[3:0], err, want_err);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
