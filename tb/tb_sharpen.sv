// tb_sharpen -- image-sharpening workload on the 8x8 hybrid approximate
// multiplier.
//
// Three 512x512 8-bit test images are generated here (sine gradients, a
// checkerboard and pseudo-random texture, a different phase and seed per
// image). Each is sharpened as  out = 2*X - (G * X) / 273,  with G the
// usual 5x5 integer Gaussian kernel (weights 1..41, sum 273) and edge pixels
// replicated. Every pixel-by-weight product goes through the multiplier;
// the same filter is also computed with exact products. The peak
// signal-to-noise ratio of the approximate result against the exact one
// must be at least 30 dB for each image. The images, the kernel and the
// threshold are this testbench's choices; the filter form is a common
// sharpening scheme for 8-bit images.
module tb_sharpen;
    localparam int N = 512;
    localparam int K [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                               '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};

    logic [7:0]  a, b;
    logic [15:0] p;
    int checks = 0, failures = 0;
    int img [N][N];

    hybrid_mult8 dut (.a(a), .b(b), .p(p));

    initial begin
        #100000000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    function automatic int clip(input int v);
        return (v < 0) ? 0 : ((v > 255) ? 255 : v);
    endfunction

    task automatic make_image(input int seed);
        int unsigned st = 32'(seed) * 32'd2654435761;
        for (int y = 0; y < N; y++)
            for (int x = 0; x < N; x++) begin
                real v;
                st = st * 32'd1664525 + 32'd1013904223;
                v  = 128.0 + 60.0 * $sin(real'(x) / 5.0 + real'(seed))
                           + 40.0 * $cos(real'(y) / 7.0)
                           + ((((x / 8) + (y / 8)) % 2 == 1) ? 50.0 : -30.0)
                           + real'(int'(st[31:24]) % 41 - 20);
                img[y][x] = clip(int'(v));
            end
    endtask

    // approximate product through the multiplier
    task automatic amul(input int x, input int w, output int r);
        a = 8'(x);
        b = 8'(w);
        #1;
        r = int'(p);
    endtask

    initial begin
        for (int im = 1; im <= 3; im++) begin
            real mse, psnr;
            mse = 0.0;
            make_image(im);
            for (int y = 0; y < N; y++)
                for (int x = 0; x < N; x++) begin
                    int se, sa, oe, oa;
                    se = 0;
                    sa = 0;
                    for (int i = 0; i < 5; i++)
                        for (int j = 0; j < 5; j++) begin
                            int yy, xx, r;
                            yy = (y + i - 2 < 0) ? 0 : ((y + i - 2 > N - 1) ? N - 1 : y + i - 2);
                            xx = (x + j - 2 < 0) ? 0 : ((x + j - 2 > N - 1) ? N - 1 : x + j - 2);
                            se += img[yy][xx] * K[i][j];
                            amul(img[yy][xx], K[i][j], r);
                            sa += r;
                        end
                    oe = clip(2 * img[y][x] - se / 273);
                    oa = clip(2 * img[y][x] - sa / 273);
                    mse += real'((oe - oa) * (oe - oa));
                end
            mse  = mse / real'(N * N);
            psnr = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
            $display("image %0d: PSNR %0.2f dB", im, psnr);
            checks++;
            if (psnr < 30.0) begin
                failures++;
                $display("FAIL image %0d: PSNR %0.2f dB below 30 dB", im, psnr);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
