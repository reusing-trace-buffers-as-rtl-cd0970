// vc_index_tb: random addresses, tag rows, row selects and ways against the
// index formulas
//   TagIndex  = (a >> 4) & (nsets-1)
//   tag row   = TagIndex*TROWS + row_sel
//   DataIndex = nsets*TROWS + TagIndex*ways + way
// and a reference four-entry tag comparison. Two instances are checked side
// by side with the same stimulus: 32 sets of 4 ways (2.5 KB trace buffer,
// one tag row per set) and 32 sets of 8 ways (5 KB, two tag rows per set).
module vc_index_tb;
  import vc_pkg::*;
  localparam int NSETS = 32;
  addr_t maddr, vaddr;
  logic sel_vaddr, sel_data;
  line_t tag_row;
  logic       row_sel;
  logic [1:0] way4;
  logic [2:0] way8;
  logic [4:0] ti4, ti8;
  logic [7:0] di4, ix4;
  logic [8:0] di8, ix8;
  logic       hit4, hit8;
  logic [1:0] slot4, slot8;
  logic [25:0] at4, at8;
  int checks = 0, failures = 0;

  vc_index #(.NSETS(NSETS), .VC_WAYS(4)) dut4 (
    .maddr, .vaddr, .sel_vaddr, .tag_row, .row_sel(1'b0), .way(way4),
    .sel_data, .tag_index(ti4), .data_index(di4), .index(ix4),
    .hit(hit4), .hit_slot(slot4), .addr_tag(at4)
  );
  vc_index #(.NSETS(NSETS), .VC_WAYS(8)) dut8 (
    .maddr, .vaddr, .sel_vaddr, .tag_row, .row_sel, .way(way8),
    .sel_data, .tag_index(ti8), .data_index(di8), .index(ix8),
    .hit(hit8), .hit_slot(slot8), .addr_tag(at8)
  );

  task automatic chk(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      addr_t a;
      int ti, exp_slot;
      logic exp_hit;
      maddr = $urandom; vaddr = $urandom;
      sel_vaddr = 1'($urandom); sel_data = 1'($urandom);
      row_sel = 1'($urandom);
      way4 = 2'($urandom); way8 = 3'($urandom);
      a = sel_vaddr ? vaddr : maddr;
      // build a tag row; sometimes plant the address tag in a slot
      exp_hit = 0; exp_slot = 0;
      for (int w = 0; w < 4; w++) begin
        tag_entry_t e;
        e.valid = 1'($urandom);
        e.owner = 2'($urandom);
        e.lru   = 3'(w);
        e.tag   = 26'($urandom);
        if ($urandom_range(2) == 0) e.tag = 26'(a >> 9);
        tag_row[w*32 +: 32] = e;
        if (!exp_hit && e.valid && e.tag == 26'(a >> 9)) begin
          exp_hit = 1; exp_slot = w;
        end
      end
      #1;
      ti = int'((a >> 4) & 31);
      chk("tag_index4", ti4, ti);
      chk("tag_index8", ti8, ti);
      chk("addr_tag", at4, (a >> 9) & 26'h3ffffff);
      chk("hit4", hit4, exp_hit);
      chk("hit8", hit8, exp_hit);
      if (exp_hit) begin
        chk("slot4", slot4, exp_slot);
        chk("slot8", slot8, exp_slot);
      end
      chk("data_index4", di4, NSETS + ti * 4 + way4);
      chk("index4", ix4, sel_data ? NSETS + ti * 4 + way4 : ti);
      chk("data_index8", di8, 2 * NSETS + ti * 8 + way8);
      chk("index8", ix8, sel_data ? 2 * NSETS + ti * 8 + way8 : ti * 2 + row_sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
