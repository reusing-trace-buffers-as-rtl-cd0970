// mode_ctrl: multi-mode victim cache controller for two hardware threads.
//
// The victim cache is either shared (both threads insert) or exclusive to
// one thread (only that thread inserts; both still read). Execution is cut
// into blocks of instructions and blocks into windows of WSIZE blocks. After
// each block (start pulse, with that block's per-thread victim cache hits
// and insertions) the controller computes
//   VUtil_i = hits_i / insertions_i                    (unsigned Q8.8)
// and then:
//  * in shared mode it adds one to counter_i of the thread whose VUtil is
//    larger;
//  * at the end of a window it also forms AvgUtil_i = sum(VUtil_i) / WSIZE.
//    In shared mode, a thread whose counter exceeds F * WSIZE gets the cache
//    in exclusive mode and th becomes its AvgUtil; the counters restart
//    either way. In exclusive mode, when the selected thread's AvgUtil has
//    been below th for this and the previous window, the cache returns to
//    shared mode.
// The cache starts in shared mode. Defaults WSIZE = 10 and F = 0.7 are the
// evaluated values. One sequential divider does every division, so a block
// takes at most 4 x 44 cycles to evaluate, small next to a block of a
// million instructions; done pulses when mode is updated.
//
// This design's own choices: the Q8.8 format; 0/0 = 0 and x/0 = the
// largest value; a tie in VUtil counts for thread 0; F is given in percent.
module mode_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned WSIZE = 10,
  parameter int unsigned F_PCT = 70,
  localparam int unsigned UW = 16,   // utilisation width, Q8.8
  localparam int unsigned SW = UW + $clog2(WSIZE + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // one block has ended
  input  logic [31:0] vhits [2],
  input  logic [31:0] vins  [2],
  output vc_mode_e    mode,
  output logic [1:0]  ins_allow,      // per thread: may insert
  output logic        done,
  // visible state, for monitoring
  output logic [UW-1:0] th,
  output logic [UW-1:0] util [2]
);

  typedef enum logic [2:0] {
    M_IDLE, M_U0, M_U1, M_ACC, M_A0, M_A1, M_DECIDE
  } mstate_e;

  mstate_e              st;
  logic                 div_start, div_busy, div_done;
  logic [39:0]          div_num, div_quo;
  logic [31:0]          div_den;
  logic [$clog2(WSIZE+1)-1:0] count;
  logic [SW-1:0]        sum  [2];
  logic [UW-1:0]        avg  [2];
  logic [UW-1:0]        prev_avg;
  logic [$clog2(WSIZE+2)-1:0] ctr [2];
  logic                 issued;

  seq_div #(.NUM_W(40), .DEN_W(32)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  function automatic logic [UW-1:0] sat(input logic [39:0] q);
    return (q > 40'((1 << UW) - 1)) ? '1 : UW'(q);
  endfunction

  // counter_i > F * WSIZE, without fractions
  function automatic logic over(input logic [$clog2(WSIZE+2)-1:0] c);
    return 32'(c) * 100 > F_PCT * WSIZE;
  endfunction

  always_comb begin
    div_start = 1'b0;
    div_num   = '0;
    div_den   = 32'd1;
    unique case (st)
      M_U0: begin div_num = {vhits[0], 8'd0}; div_den = vins[0]; end
      M_U1: begin div_num = {vhits[1], 8'd0}; div_den = vins[1]; end
      M_A0: begin div_num = 40'(sum[0]); div_den = 32'(WSIZE); end
      M_A1: begin div_num = 40'(sum[1]); div_den = 32'(WSIZE); end
      default: ;
    endcase
    if (st inside {M_U0, M_U1, M_A0, M_A1}) div_start = !issued;
  end

  always_comb begin
    unique case (mode)
      MODE_EXCL0: ins_allow = 2'b01;
      MODE_EXCL1: ins_allow = 2'b10;
      default:    ins_allow = 2'b11;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_IDLE;
      mode     <= MODE_SHARED;
      done     <= 1'b0;
      th       <= '0;
      util[0]  <= '0;
      util[1]  <= '0;
      count    <= '0;
      sum[0]   <= '0;
      sum[1]   <= '0;
      avg[0]   <= '0;
      avg[1]   <= '0;
      prev_avg <= '0;
      ctr[0]   <= '0;
      ctr[1]   <= '0;
      issued   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (div_start) issued <= 1'b1;
      unique case (st)
        M_IDLE: if (start) st <= M_U0;
        M_U0: if (div_done) begin
          util[0] <= (vhits[0] == 0) ? '0 : sat(div_quo);
          issued  <= 1'b0;
          st      <= M_U1;
        end
        M_U1: if (div_done) begin
          util[1] <= (vhits[1] == 0) ? '0 : sat(div_quo);
          issued  <= 1'b0;
          st      <= M_ACC;
        end
        M_ACC: begin
          sum[0] <= sum[0] + SW'(util[0]);
          sum[1] <= sum[1] + SW'(util[1]);
          if (mode == MODE_SHARED) begin
            if (util[0] >= util[1]) ctr[0] <= ctr[0] + 1'b1;
            else                    ctr[1] <= ctr[1] + 1'b1;
          end
          if (32'(count) + 1 == WSIZE) begin
            count <= '0;
            st    <= M_A0;
          end else begin
            count <= count + 1'b1;
            done  <= 1'b1;
            st    <= M_IDLE;
          end
        end
        M_A0: if (div_done) begin
          avg[0] <= sat(div_quo);
          issued <= 1'b0;
          st     <= M_A1;
        end
        M_A1: if (div_done) begin
          avg[1] <= sat(div_quo);
          issued <= 1'b0;
          st     <= M_DECIDE;
        end
        M_DECIDE: begin
          sum[0] <= '0;
          sum[1] <= '0;
          if (mode == MODE_SHARED) begin
            if (over(ctr[0])) begin
              mode     <= MODE_EXCL0;
              th       <= avg[0];
              prev_avg <= avg[0];
            end else if (over(ctr[1])) begin
              mode     <= MODE_EXCL1;
              th       <= avg[1];
              prev_avg <= avg[1];
            end
            ctr[0] <= '0;
            ctr[1] <= '0;
          end else begin
            logic [UW-1:0] a;
            a = (mode == MODE_EXCL0) ? avg[0] : avg[1];
            if (a < th && prev_avg < th) mode <= MODE_SHARED;
            prev_avg <= a;
          end
          done <= 1'b1;
          st   <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
