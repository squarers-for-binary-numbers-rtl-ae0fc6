// Self-checking testbench for diag_array_gen, the diagonal array generator.
//
// Random start, shift and data bits drive the generator while the testbench
// keeps its own list of the operand bits received since the last start. After
// every clock it checks x_j (the newest bit) and each diagonal term
// d[k] = x_j & x_(j-1-k), with bits older than the start counting as zero, and
// that the outputs do not change while neither start nor shift is given.
module tb_diag_array_gen;
    localparam int unsigned N = 5;
    logic clk = 1'b0;
    logic rst_n, start, shift, x, xj;
    logic [N-2:0] d;
    bit   hist [$];          // received bits, newest first
    int checks = 0, failures = 0;

    diag_array_gen dut (
        .clk(clk), .rst_n(rst_n), .start(start), .shift(shift), .x(x), .xj(xj), .d(d)
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

    initial begin
        rst_n = 1'b0; start = 1'b0; shift = 1'b0; x = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int cyc = 0; cyc < 2000; cyc++) begin
            start = ($urandom_range(0, 7) == 0);
            shift = ($urandom_range(0, 3) != 0);
            x     = 1'($urandom);
            @(posedge clk);
            if (start) hist = {x};
            else if (shift) hist.push_front(x);
            @(negedge clk);
            checks++;
            if (xj !== old(0)) begin
                failures++;
                $display("FAIL xj cycle %0d", cyc);
            end
            for (int k = 0; k < N-1; k++) begin
                checks++;
                if (d[k] !== (old(0) & old(k+1))) begin
                    failures++;
                    $display("FAIL d[%0d] cycle %0d", k, cyc);
                end
            end
            if (hist.size() > N) hist = hist[0:N-1];
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
