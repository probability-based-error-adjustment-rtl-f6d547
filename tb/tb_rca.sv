// tb_rca -- self-checking test of the ripple-carry adder at its default
// width (11 bits): corner cases (zeros, all ones, full carry ripple) and
// 20000 random operand pairs, each compared with the integer sum.
module tb_rca;
    localparam int W = 11;
    logic [W-1:0] a, b;
    logic [W:0]   sum;
    int checks = 0, failures = 0;

    rca dut (.a(a), .b(b), .sum(sum));

    task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
        a = x;
        b = y;
        #1;
        checks++;
        if (sum !== (W+1)'(x) + (W+1)'(y)) begin
            failures++;
            $display("FAIL %0d + %0d = %0d", x, y, sum);
        end
    endtask

    initial begin
        #1000000;
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        check('0, '0);
        check('1, '1);
        check('1, W'(1));
        check(W'(1), '1);
        check('1, '0);
        for (int n = 0; n < 20000; n++) check(W'($urandom), W'($urandom));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
