// Step controller shared by all serial squarers.
//
// A squarer works in numbered steps t_0 .. t_(STEPS-1), one clock each. The
// clock edge that samples `start` (together with the operand bit x_0) begins
// step t_0; each following edge begins the next step until the last one has
// been run. `step` is the index j of the step in progress and `busy` is high
// while a step is in progress. `start` always restarts the sequence, also in
// the middle of an operation, so words of exactly STEPS bits can follow one
// another without a gap. Step numbering follows the t_0, t_1, ... of the
// timing diagrams; the start strobe and the restart rule are this design's
// own choices.
module sq_step_ctrl #(
    parameter int unsigned STEPS = 5,
    localparam int unsigned SW = (STEPS > 1) ? $clog2(STEPS) : 1
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          start,
    output logic [SW-1:0] step,
    output logic          busy,
    output logic          last  // the step in progress is t_(STEPS-1)
);
    always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
            step <= '0;
            busy <= 1'b0;
        end else if (start) begin
            step <= '0;
            busy <= 1'b1;
        end else if (busy) begin
            if (last) begin
                busy <= 1'b0;
                step <= '0;
            end else begin
                step <= step + 1'b1;
            end
        end
    end

    assign last = busy && (step == SW'(STEPS - 1));
endmodule
