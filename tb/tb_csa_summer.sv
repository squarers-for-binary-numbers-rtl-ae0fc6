// Self-checking testbench for csa_summer, the carry-save summer.
//
// The testbench plays the diagonal generator (x_j and x_j*x_(j-1) ..
// x_j*x_0 in step t_j, zeros after the operand) and checks, for every
// operand of the default N = 5, both variants:
//   SERIAL = 0  after each step t_j the two rows together must be worth
//               (x_j .. x_0)^2 placed with x_j's weight at bit 2N-2; the two
//               sum-row bits at positions 2N-1-j and 2N-2-j must be y_(j+1)
//               and y_j; in t_(N-1) `total` must be the 2N-bit square.
//   SERIAL = 1  the same for t_0 .. t_(N-1), then N-1 steps without new
//               terms in which the rows keep their worth, y_(j+1) and y_j
//               appear at the same relative place and finally the sum row
//               alone holds the square in its low 2N bits.
// The carry-fit assertion inside the summer is active throughout.
module tb_csa_summer;
    localparam int unsigned N   = 5;
    localparam int unsigned SW0 = 2*N-2;
    localparam int unsigned SW1 = 4*N-4;
    logic clk = 1'b0;
    logic rst_n, start, adv0, adv1, xj;
    logic [N-2:0] d;
    logic [SW0+1:0] sum0, car0, tot0;
    logic [SW1+1:0] sum1, car1, tot1;
    int checks = 0, failures = 0;

    csa_summer #(.N(N), .SERIAL(1'b0)) u_par (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(adv0), .xj(xj), .d(d),
        .sum_row(sum0), .carry_row(car0), .total(tot0)
    );
    csa_summer #(.N(N), .SERIAL(1'b1)) u_ser (
        .clk(clk), .rst_n(rst_n), .start(start), .adv(adv1), .xj(xj), .d(d),
        .sum_row(sum1), .carry_row(car1), .total(tot1)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    task automatic check(input logic ok, input string what, input int v, input int j);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s operand %0d step %0d", what, v, j);
        end
    endtask

    initial begin
        longint unsigned part, sq, expv;
        rst_n = 1'b0; start = 1'b0; adv0 = 1'b0; adv1 = 1'b0; xj = 1'b0; d = '0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int v = 0; v < 2**N; v++) begin
            logic [N-1:0] xv;
            xv = N'(v);
            sq = longint'(v) * longint'(v);
            @(negedge clk);
            start = 1'b1;
            @(negedge clk);
            start = 1'b0;
            for (int j = 0; j < 2*N-1; j++) begin
                xj = (j < N) ? xv[j] : 1'b0;
                for (int k = 0; k < N-1; k++)
                    d[k] = (j < N && j-1-k >= 0) ? (xv[j] & xv[j-1-k]) : 1'b0;
                #1;
                part = (j < N) ? (longint'(v) & ((64'd1 << (j+1)) - 1)) : longint'(v);
                if (j < N) begin
                    expv = (part * part) << (SW0 - 2*j);
                    check(64'(sum0) + 64'(car0) == expv, "parallel rows worth", v, j);
                    check({sum0[SW0+1-j], sum0[SW0-j]} === {sq[j+1], sq[j]}, "parallel y pair", v, j);
                    if (j == N-1) check(64'(tot0) == sq, "parallel total", v, j);
                end
                expv = (part * part) << (SW1 - 2*j);
                check(64'(sum1) + 64'(car1) == expv, "serial rows worth", v, j);
                check({sum1[SW1+1-j], sum1[SW1-j]} === {sq[j+1], sq[j]}, "serial y pair", v, j);
                if (j == 2*N-2) check(64'(sum1[2*N-1:0]) == sq, "serial square", v, j);
                adv0 = (j < N-1);
                adv1 = (j < 2*N-2);
                @(negedge clk);
                adv0 = 1'b0;
                adv1 = 1'b0;
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
