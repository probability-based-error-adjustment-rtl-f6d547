// tb_esposito_c42 -- exhaustive self-checking test of the equal-weight
// approximate 4-2 compressor. {W2,W1} is compared with the published truth
// table for all 16 patterns, and W1+W2 with min(popcount, 2), which is what
// the table amounts to.
module tb_esposito_c42;
    logic [3:0] p;
    logic       w1, w2;
    int checks = 0, failures = 0;

    esposito_c42 dut (.p(p), .w1(w1), .w2(w2));

    // Expected {W2,W1} indexed by pattern p1p2p3p4 (p1 leftmost).
    localparam logic [1:0] EXP [16] = '{2'b00, 2'b01, 2'b01, 2'b11,
                                        2'b10, 2'b11, 2'b11, 2'b11,
                                        2'b10, 2'b11, 2'b11, 2'b11,
                                        2'b11, 2'b11, 2'b11, 2'b11};

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int pat = 0; pat < 16; pat++) begin
            int ones;
            p = {pat[0], pat[1], pat[2], pat[3]};
            #1;
            checks++;
            if ({w2, w1} !== EXP[pat]) begin
                failures++;
                $display("FAIL pattern %4b: W2W1=%b%b expected %2b", pat[3:0], w2, w1, EXP[pat]);
            end
            ones = $countones(p);
            checks++;
            if (int'(w1) + int'(w2) != ((ones > 2) ? 2 : ones)) begin
                failures++;
                $display("FAIL pattern %4b: W1+W2=%0d for %0d ones", pat[3:0], w1 + w2, ones);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
