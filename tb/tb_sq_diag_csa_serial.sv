// Self-checking testbench for sq_diag_csa_serial, the diagonal generator with carry-save summer, serial upper half.
//
// Every N-bit operand is applied (exhaustive for the default N = 5), least
// significant bit first, with random gaps of zero to two idle clocks between
// operations, so that some operations follow each other without a gap. The
// input pin carries random bits once the operand has been applied. In every
// step the testbench compares the step index, the busy flag and the pair of
// square bits ({y_(j+1), y_j} in every step t_j) with the square of the operand read as an unsigned number, worked out here with the
// `*` operator, and checks that the complete square is flagged exactly in
// the last step, STEPS-1 clocks after the start, and never before. A second
// pass restarts operations in the middle of a previous one.
module tb_sq_diag_csa_serial;
    localparam int unsigned N     = 5;
    localparam int unsigned C0    = (N-1)/2;
    localparam int unsigned STEPS = 2*N-1;
    localparam int unsigned SQW   = 2*N;

    logic clk = 1'b0;
    logic rst_n, start, x;
    logic [$clog2(STEPS)-1:0] step;
    logic busy, y_valid, square_valid;
    logic [1:0] y_pair;
    logic [SQW-1:0] square;
    int checks = 0, failures = 0;

    sq_diag_csa_serial dut (
        .clk(clk), .rst_n(rst_n), .start(start), .x(x), .step(step), .busy(busy),
        .y_valid(y_valid), .y_pair(y_pair), .square(square), .square_valid(square_valid)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    task automatic check(input logic ok, input string what, input int k, input logic [N-1:0] xv);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 20) $display("FAIL %s: operand %0d step %0d", what, xv, k);
        end
    endtask

    function automatic logic [2*N-1:0] ref_of(input logic [N-1:0] xv);
        logic [2*N-1:0] ref_sq;
        ref_sq = (2*N)'(xv) * (2*N)'(xv);
        return ref_sq;
    endfunction

    // Runs one operation; returns at the falling edge inside its last step
    // (or inside step `stop_at` when the operation is to be cut short).
    task automatic run_op(input logic [N-1:0] xv, input int stop_at);
        logic [2*N-1:0] ref_sq;
        logic exp_valid;
        ref_sq = ref_of(xv);
        start = 1'b1;
        x     = xv[0];
        for (int k = 0; k < STEPS; k++) begin
            @(negedge clk);
            check(busy === 1'b1 && step === ($clog2(STEPS))'(k), "step", k, xv);
        exp_valid = 1'b1;
        check(y_valid === 1'b1, "y_valid", k, xv);
        check(y_pair === {(k+1 < 2*N) ? ref_sq[k+1] : 1'b0, ref_sq[k]}, "y_pair", k, xv);
            check(square_valid === (k == STEPS-1), "square_valid", k, xv);
            if (k == STEPS-1) check(square === ref_sq[SQW-1:0], "square", k, xv);
            start = 1'b0;
            x     = (k+1 < N) ? xv[k+1] : 1'($urandom);
            if (k == stop_at) break;
        end
    endtask

    initial begin
        int gap;
        rst_n = 1'b0;
        start = 1'b0;
        x     = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk);
        for (int v = 0; v < 2**N; v++) begin
            run_op(N'(v), STEPS);
            gap = $urandom_range(0, 2);
            repeat (gap) begin
                @(negedge clk);
                check(busy === 1'b0 && square_valid === 1'b0, "idle", STEPS, N'(v));
            end
        end
        // operations cut short by a new start
        for (int v = 0; v < 2**N; v++) begin
            run_op(N'($urandom), $urandom_range(0, STEPS-2));
            run_op(N'(v), STEPS);
        end
        @(negedge clk);
        check(busy === 1'b0, "busy after last step", STEPS, '0);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
