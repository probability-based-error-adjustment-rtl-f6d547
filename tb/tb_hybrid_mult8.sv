// tb_hybrid_mult8 -- exhaustive end-to-end test of the 8x8 hybrid
// approximate multiplier at its default parameters.
//
// All 65536 operand pairs are applied. Each result is compared with a
// reference computed here column by column from the partial products:
// truth tables of the two level-1 compressors and of the proposed 4-2
// compressor, the AND correction added at weight 2^8, plain integer sums
// for the exact columns 8..14 and the constant 0110 in bits 3..0.
// The test also accumulates the error metrics (mean relative error distance
// and normalised mean error distance) and requires MRED between 2 % and 3 %,
// around the 2.5 % reported for this multiplier. It counts how often each
// mechanism of the design acts: the AND correction, the +1 and -1 errors of
// each of the four proposed compressors, the lossy cases of the Esposito
// compressors and non-zero truncated columns; a mechanism that never acts
// counts as a failure.
module tb_hybrid_mult8;
    logic [7:0]  a, b;
    logic [15:0] p;
    int checks = 0, failures = 0;

    hybrid_mult8 dut (.a(a), .b(b), .p(p));

    // {W2,W1} of the equal-weight 4-2 compressor, indexed by p1p2p3p4
    localparam logic [1:0] E42 [16] = '{2'b00, 2'b01, 2'b01, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11,
                                        2'b10, 2'b11, 2'b11, 2'b11, 2'b11, 2'b11, 2'b11, 2'b11};
    // {W1,W2} of the equal-weight 3-2 compressor, indexed by x1x2x3
    localparam logic [1:0] E32 [8]  = '{2'b00, 2'b01, 2'b10, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11};
    // {C,S} of the proposed compressor, indexed by P1P2P3P4
    localparam logic [1:0] PRO [16] = '{2'b00, 2'b01, 2'b01, 2'b01, 2'b10, 2'b10, 2'b10, 2'b10,
                                        2'b10, 2'b10, 2'b10, 2'b10, 2'b10, 2'b11, 2'b11, 2'b11};

    // mechanism counters
    int n_corr = 0, n_trunc = 0, n_e42_lossy = 0, n_e32_lossy = 0;
    int n_plus [4];
    int n_minus[4];

    // error-metric accumulators
    real red_sum = 0.0, ed_sum = 0.0, mred, nmed;
    int  n_exact = 0;

    // dot n (increasing i) of column k
    function automatic logic dot(input logic [7:0] x, input logic [7:0] y, input int k, input int n);
        int i = ((k > 7) ? k - 7 : 0) + n;
        return x[i] & y[k-i];
    endfunction

    function automatic logic [1:0] e42(input logic p1, input logic p2, input logic p3, input logic p4);
        if (p1 + p2 + p3 + p4 >= 3) n_e42_lossy++;
        return E42[{p1, p2, p3, p4}];
    endfunction

    function automatic logic [1:0] e32(input logic x1, input logic x2, input logic x3);
        if (x1 & x2 & x3) n_e32_lossy++;
        return E32[{x1, x2, x3}];
    endfunction

    // value 2C+S of the proposed compressor; logs its error
    function automatic int pro(input int idx, input logic [1:0] p12, input logic [1:0] p34);
        logic [1:0] cs;
        int err;
        cs  = PRO[{p12, p34}];
        err = 2 * int'(cs[1]) + int'(cs[0]) - $countones({p12, p34});
        if (err > 0) n_plus[idx]++;
        if (err < 0) n_minus[idx]++;
        return 2 * cs[1] + cs[0];
    endfunction

    function automatic int reference(input logic [7:0] x, input logic [7:0] y);
        logic [1:0] u, v;
        logic [1:0] q1, q2, q3, q4;   // {P1,P2} / {P3,P4} pairs
        int r = 6;                    // constant 0110 in bits 3..0
        int t = 0;
        // dropped columns
        for (int k = 0; k < 4; k++)
            for (int n = 0; n <= k; n++) t += int'(dot(x, y, k, n)) << k;
        if (t != 0) n_trunc++;
        // exact columns 8..14
        for (int k = 8; k < 15; k++)
            for (int n = 0; n < 15 - k; n++) r += int'(dot(x, y, k, n)) << k;
        // C4, column 7: two 4-2, outputs in the order W2, W1
        u = e42(dot(x,y,7,0), dot(x,y,7,1), dot(x,y,7,2), dot(x,y,7,3));
        v = e42(dot(x,y,7,4), dot(x,y,7,5), dot(x,y,7,6), dot(x,y,7,7));
        r += pro(3, u, v) << 7;
        if (v == 2'b11) begin
            r += 1 << 8;
            n_corr++;
        end
        // C3, column 6: 3-2 (W1, W2) over 4-2 (W2, W1)
        q1 = e32(dot(x,y,6,0), dot(x,y,6,1), dot(x,y,6,2));
        q2 = e42(dot(x,y,6,3), dot(x,y,6,4), dot(x,y,6,5), dot(x,y,6,6));
        r += pro(2, q1, q2) << 6;
        // C2, column 5: two raw dots over 4-2
        q3 = e42(dot(x,y,5,2), dot(x,y,5,3), dot(x,y,5,4), dot(x,y,5,5));
        r += pro(1, {dot(x,y,5,0), dot(x,y,5,1)}, q3) << 5;
        // C1, column 4: two raw dots over 3-2
        q4 = e32(dot(x,y,4,2), dot(x,y,4,3), dot(x,y,4,4));
        r += pro(0, {dot(x,y,4,0), dot(x,y,4,1)}, q4) << 4;
        return r;
    endfunction

    initial begin
        #10000000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int k = 0; k < 4; k++) begin
            n_plus[k]  = 0;
            n_minus[k] = 0;
        end
        for (int x = 0; x < 256; x++) begin
            for (int y = 0; y < 256; y++) begin
                int ref_p, exact, ed;
                a = 8'(x);
                b = 8'(y);
                #1;
                ref_p = reference(a, b);
                checks++;
                if (int'(p) != ref_p) begin
                    failures++;
                    if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", x, y, p, ref_p);
                end
                exact = x * y;
                ed    = (int'(p) > exact) ? int'(p) - exact : exact - int'(p);
                if (ed == 0) n_exact++;
                ed_sum += ed;
                if (exact != 0) red_sum += real'(ed) / real'(exact);
            end
        end
        mred = red_sum / 65536.0;
        nmed = ed_sum / 65536.0 / 65025.0;
        $display("MRED = %0.3f %%  NMED = %0.3e  exact results = %0d", mred * 100.0, nmed, n_exact);
        checks++;
        if (mred < 0.02 || mred > 0.03) begin
            failures++;
            $display("FAIL MRED %0.4f outside [0.02, 0.03]", mred);
        end
        $display("mechanisms: AND correction %0d, truncated nonzero %0d, lossy 4-2 %0d, lossy 3-2 %0d",
                 n_corr, n_trunc, n_e42_lossy, n_e32_lossy);
        for (int k = 0; k < 4; k++)
            $display("  proposed compressor C%0d: +1 errors %0d, -1 errors %0d", k + 1, n_plus[k], n_minus[k]);
        checks++;
        if (n_corr == 0 || n_trunc == 0 || n_e42_lossy == 0 || n_e32_lossy == 0) begin
            failures++;
            $display("FAIL a mechanism never acted");
        end
        for (int k = 0; k < 4; k++) begin
            checks++;
            if (n_plus[k] == 0 || n_minus[k] == 0) begin
                failures++;
                $display("FAIL compressor C%0d never showed both error signs", k + 1);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
