// seq_div: sequential unsigned divider, one shift and one subtraction per
// cycle (restoring division).
//
// The DSU's controllers use it for the ratios they need (utilisation =
// hits / insertions, the thread-to-thread feature ratios, averages), in
// keeping with the design's single adder and shifter doing division step by
// step. start loads num/den; done pulses NUM_W+1 cycles later with
// quo = floor(num / den). A zero divisor gives the all-ones quotient
// (saturation), this design's choice.
module seq_div #(
  parameter int unsigned NUM_W = 40,
  parameter int unsigned DEN_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo
);

  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] n_q;
  logic [DEN_W-1:0] d_q;
  logic [DEN_W:0]   rem;
  logic [CW-1:0]    cnt;
  logic [DEN_W:0]   trial;

  always_comb trial = {rem[DEN_W-1:0], n_q[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      n_q  <= '0;
      d_q  <= '0;
      rem  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        n_q  <= num;
        d_q  <= den;
        rem  <= '0;
        cnt  <= CW'(NUM_W);
        quo  <= '0;
      end else if (busy) begin
        if (cnt == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (d_q == 0) quo <= '1;
        end else begin
          n_q <= n_q << 1;
          cnt <= cnt - 1'b1;
          if (trial >= {1'b0, d_q}) begin
            rem <= trial - {1'b0, d_q};
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= trial;
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
