// Checks all squarers at one operand width N (testbench helper).
//
// Instantiates the six squarers, plus the sign-extension squarer with the
// most negative operand excluded, at width N. Every N-bit operand is applied
// back to back and each step's square bits, step index and final square are
// compared with `*` products. When all are done, `done` rises and `checks`
// and `failures` hold the totals.
module sq_size_check #(
    parameter int unsigned N = 5
) (
    output int checks,
    output int failures,
    output bit done
);
    localparam int unsigned C0 = (N-1)/2;
    logic clk = 1'b0;
    logic rst_n;
    localparam int unsigned ST_dcpa = N;
    logic start_dcpa, x_dcpa, busy_dcpa, y_valid_dcpa, square_valid_dcpa;
    logic [$clog2(ST_dcpa)-1:0] step_dcpa;
    logic [1:0] y_pair_dcpa;
    logic [2*N-1:0] square_dcpa;
    localparam int unsigned ST_dcsa = N;
    logic start_dcsa, x_dcsa, busy_dcsa, y_valid_dcsa, square_valid_dcsa;
    logic [$clog2(ST_dcsa)-1:0] step_dcsa;
    logic [1:0] y_pair_dcsa;
    logic [2*N-1:0] square_dcsa;
    localparam int unsigned ST_dser = 2*N-1;
    logic start_dser, x_dser, busy_dser, y_valid_dser, square_valid_dser;
    logic [$clog2(ST_dser)-1:0] step_dser;
    logic [1:0] y_pair_dser;
    logic [2*N-1:0] square_dser;
    localparam int unsigned ST_col = C0+N;
    logic start_col, x_col, busy_col, y_valid_col, square_valid_col;
    logic [$clog2(ST_col)-1:0] step_col;
    logic [1:0] y_pair_col;
    logic [2*N-1:0] square_col;
    localparam int unsigned ST_text = 2*N-2;
    logic start_text, x_text, busy_text, y_valid_text, square_valid_text;
    logic [$clog2(ST_text)-1:0] step_text;
    logic [1:0] y_pair_text;
    logic [2*N-1-1:0] square_text;
    localparam int unsigned ST_trng = 2*N-3;
    logic start_trng, x_trng, busy_trng, y_valid_trng, square_valid_trng;
    logic [$clog2(ST_trng)-1:0] step_trng;
    logic [1:0] y_pair_trng;
    logic [2*N-1-1:0] square_trng;
    localparam int unsigned ST_tneg = N;
    logic start_tneg, x_tneg, busy_tneg, y_valid_tneg, square_valid_tneg;
    logic [$clog2(ST_tneg)-1:0] step_tneg;
    logic [1:0] y_pair_tneg;
    logic [2*N-1-1:0] square_tneg;

    sq_diag_cpa #(.N(N)) u_dcpa (
        .clk(clk), .rst_n(rst_n), .start(start_dcpa), .x(x_dcpa), .step(step_dcpa), .busy(busy_dcpa),
        .y_valid(y_valid_dcpa), .y_pair(y_pair_dcpa), .square(square_dcpa), .square_valid(square_valid_dcpa)
    );
    sq_diag_csa #(.N(N)) u_dcsa (
        .clk(clk), .rst_n(rst_n), .start(start_dcsa), .x(x_dcsa), .step(step_dcsa), .busy(busy_dcsa),
        .y_valid(y_valid_dcsa), .y_pair(y_pair_dcsa), .square(square_dcsa), .square_valid(square_valid_dcsa)
    );
    sq_diag_csa_serial #(.N(N)) u_dser (
        .clk(clk), .rst_n(rst_n), .start(start_dser), .x(x_dser), .step(step_dser), .busy(busy_dser),
        .y_valid(y_valid_dser), .y_pair(y_pair_dser), .square(square_dser), .square_valid(square_valid_dser)
    );
    sq_column #(.N(N)) u_col (
        .clk(clk), .rst_n(rst_n), .start(start_col), .x(x_col), .step(step_col), .busy(busy_col),
        .y_valid(y_valid_col), .y_pair(y_pair_col), .square(square_col), .square_valid(square_valid_col)
    );
    sq_tc_ext #(.N(N)) u_text (
        .clk(clk), .rst_n(rst_n), .start(start_text), .x(x_text), .step(step_text), .busy(busy_text),
        .y_valid(y_valid_text), .y_pair(y_pair_text), .square(square_text), .square_valid(square_valid_text)
    );
    sq_tc_ext #(.N(N), .FULL_RANGE(1'b0)) u_trng (
        .clk(clk), .rst_n(rst_n), .start(start_trng), .x(x_trng), .step(step_trng), .busy(busy_trng),
        .y_valid(y_valid_trng), .y_pair(y_pair_trng), .square(square_trng), .square_valid(square_valid_trng)
    );
    sq_tc_neg #(.N(N)) u_tneg (
        .clk(clk), .rst_n(rst_n), .start(start_tneg), .x(x_tneg), .step(step_tneg), .busy(busy_tneg),
        .y_valid(y_valid_tneg), .y_pair(y_pair_tneg), .square(square_tneg), .square_valid(square_valid_tneg)
    );

    always #5 clk = ~clk;

    function automatic void chk(input logic ok);
        checks++;
        if (!ok) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d at %0t", N, $time);
        end
    endfunction

    initial begin
        checks = 0; failures = 0; done = 1'b0;
        rst_n = 1'b0;
        start_dcpa = 1'b0; x_dcpa = 1'b0; start_dcsa = 1'b0; x_dcsa = 1'b0; start_dser = 1'b0; x_dser = 1'b0; start_col = 1'b0; x_col = 1'b0; start_text = 1'b0; x_text = 1'b0; start_trng = 1'b0; x_trng = 1'b0; start_tneg = 1'b0; x_tneg = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        @(negedge clk);
        fork
        begin : drv_dcpa
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                rs = (2*N)'(xv) * (2*N)'(xv);
                start_dcpa = 1'b1;
                x_dcpa = xv[0];
                for (int k = 0; k < ST_dcpa; k++) begin
                    @(negedge clk);
                    chk(busy_dcpa === 1'b1 && step_dcpa === ($clog2(ST_dcpa))'(k));
                    chk(y_valid_dcpa === 1'b1 && y_pair_dcpa === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_dcpa === (k == ST_dcpa-1));
                    if (k == ST_dcpa-1) chk(square_dcpa === rs[2*N-1:0]);
                    start_dcpa = 1'b0;
                    x_dcpa = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_dcsa
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                rs = (2*N)'(xv) * (2*N)'(xv);
                start_dcsa = 1'b1;
                x_dcsa = xv[0];
                for (int k = 0; k < ST_dcsa; k++) begin
                    @(negedge clk);
                    chk(busy_dcsa === 1'b1 && step_dcsa === ($clog2(ST_dcsa))'(k));
                    chk(y_valid_dcsa === 1'b1 && y_pair_dcsa === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_dcsa === (k == ST_dcsa-1));
                    if (k == ST_dcsa-1) chk(square_dcsa === rs[2*N-1:0]);
                    start_dcsa = 1'b0;
                    x_dcsa = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_dser
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                rs = (2*N)'(xv) * (2*N)'(xv);
                start_dser = 1'b1;
                x_dser = xv[0];
                for (int k = 0; k < ST_dser; k++) begin
                    @(negedge clk);
                    chk(busy_dser === 1'b1 && step_dser === ($clog2(ST_dser))'(k));
                    chk(y_valid_dser === 1'b1 && y_pair_dser === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_dser === (k == ST_dser-1));
                    if (k == ST_dser-1) chk(square_dser === rs[2*N-1:0]);
                    start_dser = 1'b0;
                    x_dser = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_col
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                rs = (2*N)'(xv) * (2*N)'(xv);
                start_col = 1'b1;
                x_col = xv[0];
                for (int k = 0; k < ST_col; k++) begin
                    @(negedge clk);
                    chk(busy_col === 1'b1 && step_col === ($clog2(ST_col))'(k));
                    if (k >= C0) chk(y_valid_col === 1'b1 && y_pair_col === {rs[2*(k-C0)+1], rs[2*(k-C0)]});
                    else chk(y_valid_col === 1'b0);
                    chk(square_valid_col === (k == ST_col-1));
                    if (k == ST_col-1) chk(square_col === rs[2*N-1:0]);
                    start_col = 1'b0;
                    x_col = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_text
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                begin logic signed [N-1:0] xs; xs = xv; rs = (2*N)'(xs * xs); end
                start_text = 1'b1;
                x_text = xv[0];
                for (int k = 0; k < ST_text; k++) begin
                    @(negedge clk);
                    chk(busy_text === 1'b1 && step_text === ($clog2(ST_text))'(k));
                    chk(y_valid_text === 1'b1 && y_pair_text === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_text === (k == ST_text-1));
                    if (k == ST_text-1) chk(square_text === rs[2*N-1-1:0]);
                    start_text = 1'b0;
                    x_text = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_trng
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                if (xv == {1'b1, {(N-1){1'b0}}}) continue;
                begin logic signed [N-1:0] xs; xs = xv; rs = (2*N)'(xs * xs); end
                start_trng = 1'b1;
                x_trng = xv[0];
                for (int k = 0; k < ST_trng; k++) begin
                    @(negedge clk);
                    chk(busy_trng === 1'b1 && step_trng === ($clog2(ST_trng))'(k));
                    chk(y_valid_trng === 1'b1 && y_pair_trng === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_trng === (k == ST_trng-1));
                    if (k == ST_trng-1) chk(square_trng === rs[2*N-1-1:0]);
                    start_trng = 1'b0;
                    x_trng = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        begin : drv_tneg
            logic [2*N-1:0] rs;
            logic [N-1:0] xv;
            for (int v = 0; v < 2**N; v++) begin
                xv = N'(v);
                
                begin logic signed [N-1:0] xs; xs = xv; rs = (2*N)'(xs * xs); end
                start_tneg = 1'b1;
                x_tneg = xv[0];
                for (int k = 0; k < ST_tneg; k++) begin
                    @(negedge clk);
                    chk(busy_tneg === 1'b1 && step_tneg === ($clog2(ST_tneg))'(k));
                    chk(y_valid_tneg === 1'b1 && y_pair_tneg === {(k+1 < 2*N) ? rs[k+1] : 1'b0, rs[k]});
                    chk(square_valid_tneg === (k == ST_tneg-1));
                    if (k == ST_tneg-1) chk(square_tneg === rs[2*N-1-1:0]);
                    start_tneg = 1'b0;
                    x_tneg = (k+1 < N) ? xv[k+1] : 1'($urandom);
                end
            end
        end
        join
        done = 1'b1;
    end
endmodule
