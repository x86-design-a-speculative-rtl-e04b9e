// One run of the speculative memory access unit on the loop program of
// tb_smau_top, for a chosen prediction policy, address prediction on or off
// and send-back strategy.  Checks the committed value of every load, commit
// order and the final memory image against an in-order golden model, and
// reports the cycles the program took.  Used by tb_policies.
module smau_run
  import smau_pkg::*;
#(
  parameter dep_policy_e POLICY    = POL_SDP,
  parameter bit          USE_AP    = 1'b1,
  parameter send_back_e  SEND_BACK = SB_ASB,
  parameter int unsigned N         = 1600,
  parameter int unsigned SEED      = 5
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cycles,
  output logic done
);
  localparam int unsigned DEPTH = 16;
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned NB = 10;
  localparam logic [ADDR_W-1:0] BASE = 32'h0001_0000;

  // ---------------- DUT ----------------
  logic disp_valid, disp_is_store, disp_ready;
  logic [PC_W-1:0] disp_pc;
  logic [TAG_W-1:0] disp_tag;
  size_t disp_size;
  logic [IW-1:0] disp_idx, agu_idx, std_idx;
  logic agu_valid, std_valid;
  logic [ADDR_W-1:0] agu_addr;
  logic [DATA_W-1:0] std_data;
  logic dc_rd_req, dc_wr_req;
  logic [ADDR_W-1:0] dc_rd_addr, dc_wr_addr;
  logic [DATA_W-1:0] dc_rd_data, dc_wr_data;
  logic [3:0] dc_wr_mask;
  logic wb_valid, head_ready, commit, recover_valid;
  logic [TAG_W-1:0] wb_tag, head_tag, recover_tag;
  logic [DATA_W-1:0] wb_data;
  umab_events_t ev;
  logic pred_ready;

  smau_top #(.POLICY(POLICY), .USE_AP(USE_AP), .SEND_BACK(SEND_BACK)) dut (.*);

  // ---------------- program and golden values ----------------
  logic              op_st   [N];
  logic [PC_W-1:0]   op_pc   [N];
  size_t             op_sz   [N];
  logic [ADDR_W-1:0] op_addr [N];
  logic [DATA_W-1:0] op_data [N];
  logic [DATA_W-1:0] op_exp  [N];
  logic [7:0]        gmem    [256];
  logic [DATA_W-1:0] dmem    [64];


  initial begin
    logic [DATA_W-1:0] w;
    void'($urandom(SEED));
    for (int a = 0; a < 256; a++) gmem[a] = 8'(a * 7 + 3);
    for (int a = 0; a < 64; a++)  dmem[a] = {gmem[4*a+3], gmem[4*a+2], gmem[4*a+1], gmem[4*a]};
    for (int n = 0; n < N; n++) begin
      int k, it;
      logic [7:0] lo;
      k  = n % NB;
      it = n / NB;
      op_pc[n] = 32'h0040_1000 + 32'(k * 5);
      op_sz[n] = 2'd3;
      op_st[n] = (k == 0 || k == 3 || k == 5 || k == 8);
      case (k)
        0, 1:    lo = 8'h10;
        2:       lo = 8'(8'h40 + 8'((it % 16) * 4));
        3:       begin lo = 8'h21; op_sz[n] = 2'd0; end
        4:       lo = 8'h20;
        5, 6:    lo = 8'(8'h80 + 8'(($urandom % 4) * 4));
        7:       begin lo = 8'h32; op_sz[n] = 2'd1; end
        8:       lo = 8'(8'hc0 + 8'((it % 16) * 4));
        default: lo = 8'(8'hc0 + 8'(((it + 15) % 16) * 4));
      endcase
      op_addr[n] = BASE + 32'(lo);
      op_data[n] = $urandom;
      w = {gmem[{op_addr[n][7:2], 2'd3}], gmem[{op_addr[n][7:2], 2'd2}],
           gmem[{op_addr[n][7:2], 2'd1}], gmem[{op_addr[n][7:2], 2'd0}]};
      if (op_st[n]) begin
        for (int b = 0; b < 4; b++)
          if (byte_mask(op_addr[n][1:0], op_sz[n])[b])
            gmem[{op_addr[n][7:2], 2'(b)}] = op_data[n][8*(b - int'(op_addr[n][1:0])) +: 8];
        op_exp[n] = '0;
      end else begin
        op_exp[n] = extract(w, op_addr[n][1:0], op_sz[n]);
      end
    end
  end

  // ---------------- data cache model ----------------
  always @(posedge clk) begin
    if (dc_rd_req) dc_rd_data <= dmem[dc_rd_addr[7:2]];
    if (dc_wr_req)
      for (int b = 0; b < 4; b++)
        if (dc_wr_mask[b]) dmem[dc_wr_addr[7:2]][8*b +: 8] <= dc_wr_data[8*b +: 8];
  end

  // ---------------- driver and checker ----------------
  int  next, committed;
  int  slot_seq [DEPTH];
  logic slot_live [DEPTH], agu_pend [DEPTH], std_pend [DEPTH];
  int  agu_cnt [DEPTH], std_cnt [DEPTH];
  logic [DATA_W-1:0] lastwb [N];
  logic haswb [N];
  int  n_spec, n_sfwd, n_pa, n_stdf, n_filt, n_wait, n_amiss, n_dmiss, n_rec, n_rep, n_stale;

  function automatic int seq_of_tag(input logic [TAG_W-1:0] t);
    for (int s = 0; s < DEPTH; s++) if (slot_live[s] && TAG_W'(slot_seq[s]) == t) return slot_seq[s];
    return -1;
  endfunction
  function automatic int slot_of_seq(input int q);
    for (int s = 0; s < DEPTH; s++) if (slot_live[s] && slot_seq[s] == q) return s;
    return -1;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0; next = 0; committed = 0; cycles = 0;
    n_spec = 0; n_sfwd = 0; n_pa = 0; n_stdf = 0; n_filt = 0; n_wait = 0;
    n_amiss = 0; n_dmiss = 0; n_rec = 0; n_rep = 0; n_stale = 0;
    for (int s = 0; s < DEPTH; s++) begin slot_live[s] = 0; agu_pend[s] = 0; std_pend[s] = 0; end
    for (int n = 0; n < N; n++) haswb[n] = 0;
    disp_valid = 0; agu_valid = 0; std_valid = 0; commit = 0;
    disp_is_store = 0; disp_pc = '0; disp_tag = '0; disp_size = '0; agu_idx = '0; agu_addr = '0;
    std_idx = '0; std_data = '0;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      int s, q, ag, sd;
      cycles++;
      disp_valid = 0; agu_valid = 0; std_valid = 0; commit = 0;
      // event statistics
      n_spec += int'(ev.spec_issue); n_sfwd += int'(ev.spec_fwd); n_pa += int'(ev.pred_addr);
      n_stdf += int'(ev.std_fwd); n_amiss += int'(ev.addr_miss); n_dmiss += int'(ev.dep_miss);
      n_rec += int'(ev.recover); n_filt += int'(ev.filtered); n_wait += int'(ev.wait_pair); n_rep += int'(ev.replay); n_stale += int'(ev.stale);
      // write back
      if (wb_valid) begin
        q = seq_of_tag(wb_tag);
        checks++;
        if (q < 0 || op_st[q]) begin
          failures++; $display("FAIL: write back for unknown tag %0d", wb_tag);
        end else begin
          lastwb[q] = wb_data; haswb[q] = 1;
        end
      end
      // commit
      if (head_ready && ($urandom % 8 != 0)) begin
        commit = 1;
        q = seq_of_tag(head_tag);
        s = slot_of_seq(q);
        checks++;
        if (q != committed) begin
          failures++; $display("FAIL: commit order: got op %0d, expected %0d", q, committed);
        end else if (!op_st[q]) begin
          checks++;
          if (!haswb[q] || lastwb[q] !== op_exp[q]) begin
            failures++; $display("FAIL: load op %0d committed with %h (sent %0d), expected %h", q, lastwb[q], haswb[q], op_exp[q]);
          end
        end
        if (s >= 0) slot_live[s] = 0;
        committed++;
      end
      // recovery: squash everything younger than the load
      if (recover_valid) begin
        q = seq_of_tag(recover_tag);
        if (q < 0 || op_st[q]) begin
          failures++; $display("FAIL: recovery for unknown tag %0d", recover_tag);
        end else begin
          for (int k = 0; k < DEPTH; k++)
            if (slot_live[k] && slot_seq[k] > q) begin
              slot_live[k] = 0; haswb[slot_seq[k]] = 0;
            end
          next = q + 1;
        end
      end
      // address generation and store data, one each per cycle
      ag = -1; sd = -1;
      for (int k = 0; k < DEPTH; k++) begin
        if (slot_live[k] && agu_pend[k]) begin
          if (agu_cnt[k] > 0) agu_cnt[k]--; else if (ag < 0) ag = k;
        end
        if (slot_live[k] && std_pend[k]) begin
          if (std_cnt[k] > 0) std_cnt[k]--; else if (sd < 0) sd = k;
        end
      end
      if (ag >= 0) begin
        agu_valid = 1; agu_idx = IW'(ag); agu_addr = op_addr[slot_seq[ag]]; agu_pend[ag] = 0;
      end
      if (sd >= 0) begin
        std_valid = 1; std_idx = IW'(sd); std_data = op_data[slot_seq[sd]]; std_pend[sd] = 0;
      end
      // dispatch; predictions come from the unit's own tables
      if (!recover_valid && disp_ready && next < N && ($urandom % 10 != 0)) begin
        disp_valid    = 1;
        disp_is_store = op_st[next];
        disp_pc       = op_pc[next];
        disp_tag      = TAG_W'(next);
        disp_size     = op_sz[next];
        s = int'(disp_idx);
        slot_seq[s] = next; slot_live[s] = 1;
        agu_pend[s] = 1; agu_cnt[s] = 2 + $urandom % 12;
        std_pend[s] = op_st[next]; std_cnt[s] = $urandom % 6;
        next++;
      end
      if (committed == N && !commit) begin
        for (int a = 0; a < 64; a++) begin
          checks++;
          if (dmem[a] !== {gmem[4*a+3], gmem[4*a+2], gmem[4*a+1], gmem[4*a]}) begin
            failures++; $display("FAIL: final memory word %0d = %h", a, dmem[a]);
          end
        end
        done = 1'b1;
      end
    end
  end

endmodule
