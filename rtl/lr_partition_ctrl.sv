// lr_partition_ctrl: victim cache way partitioning by multiclass logistic
// regression, for NTHR threads and a WAYS-way victim cache.
//
// After each block (start pulse) the unit reads six per-thread statistics
// of that block: victim cache hits (vh), load misses (lm), store misses
// (sm), data cache misses (cm), data cache hits (ch) and victim cache
// insertions (insert). For every pair of threads (i, j), i < j:
//  * the six features are the ratios stat_i / stat_j (unsigned Q8.8);
//  * for every class t = 0..WAYS (t ways to thread i, WAYS - t to thread j)
//      logit_t = a0 + a1*vh + a2*lm + a3*sm + a4*cm + a5*ch + a6*insert
//    with the class weights read from the DSU trace buffer;
//  * the class with the largest logit wins (the logistic function is
//    monotonic, so no exponential is needed): P[i] += t, P[j] += WAYS - t.
// Then each thread's demand is WaysReq[m] = P[m] * WAYS / sum(P), compared
// with its current ways: increase, decrease or keep. With two threads the
// wanted ways of thread 0 go to the two-stage state machine partition_fsm;
// with more threads a move of one way from a "decrease" thread to an
// "increase" thread (the lowest-numbered of each) is made when the same
// move was also asked for after the previous block, the same two-block
// hysteresis. Ways are handed out in order: thread 0 owns the first
// curr_w[0] ways, thread 1 the next curr_w[1], and so on.
//
// Arithmetic: one sequential divider (one subtract and shift per cycle) and
// one shift-and-add multiplier (one addition per cycle). With two threads
// and four ways a block takes about 6*44 + 5*(2 + 6*16 + 1) + 2*44 cycles,
// roughly 900, small next to a block of a million instructions.
//
// Weights: one DSU trace buffer row per class t, row t, holding seven signed
// Q8.8 coefficients: a0 in bits 15:0, a1 in 31:16, ... a6 in 111:96. They are
// learned offline and written through the wt_* port while the unit is idle.
// The features, the classes, the use of the logit, the pairwise algorithm
// and the hysteresis follow the design. The number formats, 0/0 = 1.0 and
// x/0 = the largest ratio, lowest-t wins on equal logits, the weight row
// layout, the DSU trace buffer depth and the way order are this design's
// choices.
module lr_partition_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned NTHR     = 2,
  parameter int unsigned NWAYS    = 4,
  parameter int unsigned DSU_ROWS = 64,
  localparam int unsigned THR_W = (NTHR > 1) ? $clog2(NTHR) : 1,
  localparam int unsigned CW    = $clog2(NWAYS + 1),
  localparam int unsigned RW    = $clog2(DSU_ROWS),
  localparam int unsigned NFEAT = 6,
  localparam int unsigned PW    = CW + $clog2(NTHR + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [31:0]      stats [NTHR][NFEAT],  // vh, lm, sm, cm, ch, insert
  input  logic             wt_we,
  input  logic [RW-1:0]    wt_addr,
  input  line_t            wt_data,
  output logic             busy,
  output logic             done,
  output logic [CW-1:0]    curr_w    [NTHR],
  output logic [THR_W-1:0] way_owner [NWAYS],
  output logic [CW-1:0]    last_req  [NTHR]   // WaysReq of the last block
);

  typedef enum logic [3:0] {
    L_IDLE, L_FEAT, L_RDW, L_LATCH, L_MUL, L_CMP, L_PAIR, L_REQ, L_DECIDE
  } lstate_e;

  lstate_e st;

  // ------------------------------------------------------------ DSU trace buffer
  logic  mem_en, mem_we;
  logic [RW-1:0] mem_addr;
  line_t mem_rdata;

  trace_buffer #(.DEPTH(DSU_ROWS), .WIDTH(LINE_W)) u_dsu_tb (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(wt_data),
    .rdata(mem_rdata)
  );

  // ------------------------------------------------------------ divider
  logic        div_start, div_done, div_busy, issued;
  logic [39:0] div_num, div_quo;
  logic [31:0] div_den;

  seq_div #(.NUM_W(40), .DEN_W(32)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  // ------------------------------------------------------------ datapath regs
  logic [THR_W-1:0]    pi, pj, pm;
  logic [2:0]          fidx;
  logic [3:0]          bidx;
  logic [CW-1:0]       t, best_t;
  logic [15:0]         feat [NFEAT];
  logic signed [15:0]  wrow [NFEAT+1];
  logic signed [39:0]  acc, best;
  logic [PW-1:0]       p [NTHR];
  logic [CW-1:0]       req_w [NTHR];

  localparam int unsigned PSUM = NTHR * (NTHR - 1) / 2 * NWAYS;

  always_comb begin
    div_num   = '0;
    div_den   = 32'd1;
    div_start = 1'b0;
    if (st == L_FEAT) begin
      div_num   = {stats[pi][fidx], 8'd0};
      div_den   = stats[pj][fidx];
      div_start = !issued;
    end else if (st == L_REQ) begin
      div_num   = 40'(p[pm]) * NWAYS;
      div_den   = 32'(PSUM);
      div_start = !issued;
    end
    mem_en   = (st == L_IDLE && wt_we) || st == L_RDW;
    mem_we   = st == L_IDLE;
    mem_addr = (st == L_IDLE) ? wt_addr : RW'(t);
    busy     = st != L_IDLE;
  end

  // one partial product: the weight shifted by the feature bit position
  logic signed [39:0] addend;
  always_comb addend = 40'(wrow[fidx + 1]) <<< bidx;

  // ------------------------------------------------------------ control
  logic [CW-1:0] curr_q [NTHR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= L_IDLE;
      issued <= 1'b0;
      done   <= 1'b0;
      pi <= '0; pj <= '0; pm <= '0;
      fidx <= '0; bidx <= '0; t <= '0; best_t <= '0;
      acc <= '0; best <= '0;
      for (int k = 0; k < NFEAT; k++) feat[k] <= '0;
      for (int k = 0; k <= NFEAT; k++) wrow[k] <= '0;
      for (int m = 0; m < NTHR; m++) begin
        p[m]        <= '0;
        req_w[m]    <= '0;
        last_req[m] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (div_start) issued <= 1'b1;
      unique case (st)
        L_IDLE: if (start) begin
          for (int m = 0; m < NTHR; m++) p[m] <= '0;
          pi   <= '0;
          pj   <= THR_W'(1);
          fidx <= '0;
          st   <= L_FEAT;
        end
        L_FEAT: if (div_done) begin
          issued <= 1'b0;
          if (stats[pi][fidx] == 0 && stats[pj][fidx] == 0) feat[fidx] <= 16'h0100;
          else if (div_quo > 40'hFFFF) feat[fidx] <= 16'hFFFF;
          else feat[fidx] <= div_quo[15:0];
          if (fidx == 3'(NFEAT - 1)) begin
            t  <= '0;
            st <= L_RDW;
          end else fidx <= fidx + 1'b1;
        end
        L_RDW: st <= L_LATCH;
        L_LATCH: begin
          for (int k = 0; k <= NFEAT; k++) wrow[k] <= mem_rdata[16*k +: 16];
          acc  <= 40'(signed'(mem_rdata[15:0])) <<< 8;   // a0 in Q16.16
          fidx <= '0;
          bidx <= '0;
          st   <= L_MUL;
        end
        L_MUL: begin
          if (feat[fidx][bidx]) acc <= acc + addend;
          bidx <= bidx + 1'b1;
          if (bidx == 4'd15) begin
            if (fidx == 3'(NFEAT - 1)) st <= L_CMP;
            else fidx <= fidx + 1'b1;
          end
        end
        L_CMP: begin
          if (t == 0 || acc > best) begin
            best   <= acc;
            best_t <= t;
          end
          if (t == CW'(NWAYS)) st <= L_PAIR;
          else begin
            t  <= t + 1'b1;
            st <= L_RDW;
          end
        end
        L_PAIR: begin
          p[pi] <= p[pi] + PW'(best_t);
          p[pj] <= p[pj] + PW'(NWAYS) - PW'(best_t);
          fidx  <= '0;
          if (32'(pj) == NTHR - 1) begin
            if (32'(pi) == NTHR - 2) begin
              pm <= '0;
              st <= L_REQ;
            end else begin
              pi <= pi + 1'b1;
              pj <= THR_W'(pi + 2);
              st <= L_FEAT;
            end
          end else begin
            pj <= pj + 1'b1;
            st <= L_FEAT;
          end
        end
        L_REQ: if (div_done) begin
          issued    <= 1'b0;
          req_w[pm] <= CW'(div_quo);
          if (32'(pm) == NTHR - 1) st <= L_DECIDE;
          else pm <= pm + 1'b1;
        end
        L_DECIDE: begin
          for (int m = 0; m < NTHR; m++) last_req[m] <= req_w[m];
          done <= 1'b1;
          st   <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ two-stage update
  if (NTHR == 2) begin : g_two
    logic [CW-1:0] cc;
    logic [1:0]    fsm_state;
    partition_fsm #(.WAYS(NWAYS)) u_fsm (
      .clk, .rst_n, .step(st == L_DECIDE), .cls(req_w[0]),
      .curr_class(cc), .state(fsm_state)
    );
    always_comb begin
      curr_q[0] = cc;
      curr_q[1] = CW'(NWAYS) - cc;
    end
  end else begin : g_many
    logic             pend_v;
    logic [THR_W-1:0] pend_inc, pend_dec;
    logic             have_inc, have_dec;
    logic [THR_W-1:0] inc_t, dec_t;
    logic [CW-1:0]    cw [NTHR];

    always_comb begin
      have_inc = 1'b0; have_dec = 1'b0;
      inc_t = '0; dec_t = '0;
      for (int m = 0; m < NTHR; m++) begin
        if (!have_inc && req_w[m] > cw[m]) begin have_inc = 1'b1; inc_t = THR_W'(m); end
        if (!have_dec && req_w[m] < cw[m]) begin have_dec = 1'b1; dec_t = THR_W'(m); end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pend_v   <= 1'b0;
        pend_inc <= '0;
        pend_dec <= '0;
        for (int m = 0; m < NTHR; m++) cw[m] <= CW'(NWAYS / NTHR);
      end else if (st == L_DECIDE) begin
        if (have_inc && have_dec) begin
          if (pend_v && pend_inc == inc_t && pend_dec == dec_t) begin
            cw[inc_t] <= cw[inc_t] + 1'b1;
            cw[dec_t] <= cw[dec_t] - 1'b1;
            pend_v    <= 1'b0;
          end else begin
            pend_v   <= 1'b1;
            pend_inc <= inc_t;
            pend_dec <= dec_t;
          end
        end else pend_v <= 1'b0;
      end
    end
    always_comb for (int m = 0; m < NTHR; m++) curr_q[m] = cw[m];
  end

  // ------------------------------------------------------------ way ownership
  always_comb begin
    int unsigned base;
    base = 0;
    for (int w = 0; w < NWAYS; w++) way_owner[w] = THR_W'(NTHR - 1);
    for (int m = NTHR - 1; m >= 0; m--) curr_w[m] = curr_q[m];
    for (int m = 0; m < NTHR; m++) begin
      for (int w = 0; w < NWAYS; w++)
        if (w >= base && w < base + 32'(curr_q[m])) way_owner[w] = THR_W'(m);
      base = base + 32'(curr_q[m]);
    end
  end

endmodule
