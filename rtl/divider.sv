// divider: sequential unsigned restoring divider, one quotient bit per clock.
//
// A one-cycle `start` loads the operands. The divider then shifts the
// dividend into a partial remainder one bit per clock, subtracting the
// divisor whenever it fits, and after WIDTH clocks raises `done` for one
// cycle with `quotient` and `remainder` valid (they hold until the next
// start). With the default WIDTH of 32 the result is ready 32 clocks after
// the start. A zero divisor gives an all-ones quotient. `start` must not be
// raised while `busy` is high.
module divider #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] dvs;
  logic [WIDTH-1:0] rem;
  logic [WIDTH-1:0] quo;      // shifts the dividend out, the quotient in
  logic [CW-1:0]    bits_left;

  logic [WIDTH:0]   trial;    // partial remainder with the next dividend bit
  logic [WIDTH:0]   diff;

  always_comb begin
    trial = {rem, quo[WIDTH-1]};
    diff  = trial - {1'b0, dvs};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      bits_left <= '0;
      rem       <= '0;
      quo       <= '0;
      dvs       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        bits_left <= CW'(WIDTH);
        rem       <= '0;
        quo       <= dividend;
        dvs       <= divisor;
      end else if (busy) begin
        if (!diff[WIDTH]) begin
          rem <= diff[WIDTH-1:0];
          quo <= {quo[WIDTH-2:0], 1'b1};
        end else begin
          rem <= trial[WIDTH-1:0];
          quo <= {quo[WIDTH-2:0], 1'b0};
        end
        bits_left <= bits_left - 1'b1;
        if (bits_left == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo;
  assign remainder = rem;

  // A new division may only start once the previous one is finished.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !start)
    else $error("divider: start while busy");

endmodule
