// tb_esposito_c32 -- exhaustive self-checking test of the equal-weight
// approximate 3-2 compressor: two or more ones must give W1 = W2 = 1, a
// single one must give W1+W2 = 1, and the outputs must be 0 in 36 and 45 of
// the 64 weighted cases when each input is 1 with probability 1/4.
module tb_esposito_c32;
    logic [2:0] x;
    logic       w1, w2;
    int checks = 0, failures = 0;
    int zero1 = 0, zero2 = 0;   // weighted counts, out of 64

    esposito_c32 dut (.x(x), .w1(w1), .w2(w2));

    initial begin
        #100000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int pat = 0; pat < 8; pat++) begin
            int ones, weight;
            x = pat[2:0];
            #1;
            ones   = $countones(x);
            weight = 1;
            for (int k = 0; k < 3; k++) weight *= x[k] ? 1 : 3;
            if (!w1) zero1 += weight;
            if (!w2) zero2 += weight;
            checks++;
            if (ones >= 2 && {w2, w1} !== 2'b11) begin
                failures++;
                $display("FAIL x=%3b: W2W1=%b%b expected 11", x, w2, w1);
            end
            if (ones < 2 && int'(w1) + int'(w2) != ones) begin
                failures++;
                $display("FAIL x=%3b: W1+W2=%0d expected %0d", x, w1 + w2, ones);
            end
        end
        checks++;
        if (zero1 != 36 || zero2 != 45) begin
            failures++;
            $display("FAIL zero probabilities %0d/64 and %0d/64, expected 36/64 and 45/64", zero1, zero2);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
