// Self-checking testbench for tc_diag_array_gen, the diagonal generator for
// two's-complement operands with a negative-weight sign bit.
//
// Random start, shift, last and data bits drive the block; the testbench
// keeps its own list of received operand bits and checks x_j, every diagonal
// term (inverted whenever `last` is high) and the auxiliary 1 (equal to
// `last`). It also checks the arithmetic the complement stands for: with
// `last` high, the diagonal terms plus the auxiliary 1 at the lowest term's
// weight equal 2^(N-1) minus the positive diagonal, modulo 2^(N-1).
module tb_tc_diag_array_gen;
    localparam int unsigned N = 5;
    logic clk = 1'b0;
    logic rst_n, start, shift, last, x, xj, aux;
    logic [N-2:0] d;
    bit   hist [$];
    int checks = 0, failures = 0;

    tc_diag_array_gen dut (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(shift), .last(last), .x(x),
        .xj(xj), .d(d), .aux(aux)
    );

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (5000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    function automatic bit old(input int k);
        return (k < hist.size()) ? hist[k] : 1'b0;
    endfunction

    task automatic check(input logic ok, input string what, input int cyc);
        checks++;
        if (!ok) begin
            failures++;
            $display("FAIL %s cycle %0d", what, cyc);
        end
    endtask

    initial begin
        logic [N-2:0] pos;
        int unsigned  neg_sum;
        rst_n = 1'b0; start = 1'b0; shift = 1'b0; last = 1'b0; x = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int cyc = 0; cyc < 2000; cyc++) begin
            start = ($urandom_range(0, 7) == 0);
            shift = ($urandom_range(0, 3) != 0);
            x     = 1'($urandom);
            @(posedge clk);
            if (start) hist = {x};
            else if (shift) hist.push_front(x);
            if (hist.size() > N) hist = hist[0:N-1];
            last = 1'($urandom);
            @(negedge clk);
            check(xj === old(0), "xj", cyc);
            check(aux === last, "aux", cyc);
            for (int k = 0; k < N-1; k++) pos[k] = old(0) & old(k+1);
            check(d === (last ? ~pos : pos), "d", cyc);
            if (last) begin
                // d[k] has weight 2^(N-2-k) relative to the lowest term
                neg_sum = 0;
                for (int k = 0; k < N-1; k++) neg_sum += int'(d[k]) << (N-2-k);
                neg_sum += int'(aux);
                check(((neg_sum + int'({<<{pos}})) % (2**(N-1))) == 0, "complement arithmetic", cyc);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
