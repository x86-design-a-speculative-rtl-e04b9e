// Selective dependency/forwarding prediction table (SDPT): a store-load pair
// predictor with a classify counter and a filter counter.
//
// The table is indexed by the PC of a load and organised as a set-associative
// cache (4K entries, 4-way by default).  An entry holds a valid bit, a tag,
// a 2-bit saturating classify counter (tendency of the load to be
// independent), a forwarding bit (the paired store can supply the whole
// value), the PC of the paired store, and a 2-bit saturating filter counter
// (tendency of the load to be mispredicted).  The POLICY parameter selects
// how the fields are used:
//   POL_PL  : every load is predicted independent, the table is unused;
//   POL_DP  : a table hit means dependent on the paired store;
//   POL_CDP : a hit is dependent only while classify < 2;
//   POL_SDP : as CDP, and a hit with filter >= 2 is reported as filtered,
//             so the load is scheduled conventionally instead.
//
// Interface and timing:
//   lookup : lk_pc in; lk_hit, lk_dep, lk_filtered, lk_fwd, lk_fwd_pc out in
//            the same cycle.  lk_dep is the raw dependence prediction,
//            before filtering.
//   train  : tr_valid with the load PC, the observed dependence tr_dep, the
//            PC of the store it depended on, whether that store covered the
//            load (tr_fwd) and whether the dependence prediction was wrong
//            (tr_mispred); written at the next rising edge.  A hit moves the
//            classify counter towards independent (no dependence) or
//            dependent, moves the filter counter up on a misprediction and
//            down otherwise, and refreshes the pair on a dependence.  A miss
//            with a dependence allocates an entry with classify = 1 (weakly
//            dependent) and filter = 0.
// After reset the valid bits and victim pointers, kept in memory like the
// other fields, are cleared by a sweep of one set per cycle (SETS cycles);
// ready rises when it is done, and until then lookups miss and training is
// dropped.
// The entry fields follow the published block diagrams; the counter
// thresholds, the allocation rule and the replacement policy (invalid way
// first, then round robin) are this design's choices.
module sdpt
  import smau_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned WAYS    = 4,
  parameter dep_policy_e POLICY  = POL_SDP
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_hit,
  output logic            lk_dep,
  output logic            lk_filtered,
  output logic            lk_fwd,
  output logic [PC_W-1:0] lk_fwd_pc,
  output logic            ready,      // reset sweep finished
  // training
  input  logic            tr_valid,
  input  logic [PC_W-1:0] tr_pc,
  input  logic            tr_dep,
  input  logic            tr_fwd,
  input  logic [PC_W-1:0] tr_store_pc,
  input  logic            tr_mispred
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_B = PC_W - IDX_W;

  logic [WAYS-1:0]  valid_q [SETS];   // in memory, cleared by the sweep
  logic [WAY_W-1:0] rr_q    [SETS];
  logic             clr_q;            // reset sweep in progress
  logic [IDX_W-1:0] clr_idx_q;
  logic [TAG_B-1:0] tag_m   [WAYS][SETS];
  logic [1:0]       cls_m   [WAYS][SETS];
  logic             fwd_m   [WAYS][SETS];
  logic [PC_W-1:0]  spc_m   [WAYS][SETS];
  logic [1:0]       flt_m   [WAYS][SETS];

  function automatic logic [1:0] sat_inc(input logic [1:0] c);
    return (c == 2'd3) ? c : c + 2'd1;
  endfunction
  function automatic logic [1:0] sat_dec(input logic [1:0] c);
    return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  assign ready = !clr_q;

  // ---------------- lookup ----------------
  logic [IDX_W-1:0] lk_set;
  logic             raw_hit;
  logic [1:0]       hit_cls, hit_flt;
  always_comb begin
    lk_set    = lk_pc[IDX_W-1:0];
    raw_hit   = 1'b0;
    hit_cls   = '0;
    hit_flt   = '0;
    lk_fwd    = 1'b0;
    lk_fwd_pc = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!clr_q && valid_q[lk_set][w] && tag_m[w][lk_set] == lk_pc[PC_W-1:IDX_W]) begin
        raw_hit   = 1'b1;
        hit_cls   = cls_m[w][lk_set];
        hit_flt   = flt_m[w][lk_set];
        lk_fwd    = fwd_m[w][lk_set];
        lk_fwd_pc = spc_m[w][lk_set];
      end
    end
    lk_hit      = (POLICY != POL_PL) && raw_hit;
    case (POLICY)
      POL_PL:  lk_dep = 1'b0;
      POL_DP:  lk_dep = raw_hit;
      default: lk_dep = raw_hit && !hit_cls[1];
    endcase
    lk_filtered = (POLICY == POL_SDP) && raw_hit && hit_flt[1];
  end

  // ---------------- training ----------------
  logic [IDX_W-1:0] tr_set;
  logic             tr_hit, vic_free;
  logic [WAY_W-1:0] tr_way, vic_way;
  always_comb begin
    tr_set   = tr_pc[IDX_W-1:0];
    tr_hit   = 1'b0;
    tr_way   = '0;
    vic_free = 1'b0;
    vic_way  = rr_q[tr_set];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[tr_set][w]) begin
        vic_free = 1'b1;
        vic_way  = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[tr_set][w] && tag_m[w][tr_set] == tr_pc[PC_W-1:IDX_W]) begin
        tr_hit = 1'b1;
        tr_way = WAY_W'(w);
      end
    end
  end

  logic do_alloc;
  assign do_alloc = tr_valid && !clr_q && !tr_hit && tr_dep;

  // After reset the valid bits and victim pointers are cleared one set per
  // cycle (SETS cycles); meanwhile lookups miss and training is dropped.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_q     <= 1'b1;
      clr_idx_q <= '0;
    end else if (clr_q) begin
      clr_idx_q <= clr_idx_q + 1'b1;
      if (clr_idx_q == IDX_W'(SETS - 1)) clr_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clr_q) begin
      valid_q[clr_idx_q] <= '0;
      rr_q[clr_idx_q]    <= '0;
    end else if (do_alloc) begin
      valid_q[tr_set] <= valid_q[tr_set] | (WAYS'(1) << vic_way);
      if (!vic_free) rr_q[tr_set] <= WAY_W'((32'(rr_q[tr_set]) + 1) % WAYS);
    end
  end

  always_ff @(posedge clk) begin
    if (tr_valid && !clr_q && tr_hit) begin
      cls_m[tr_way][tr_set] <= tr_dep ? sat_dec(cls_m[tr_way][tr_set]) : sat_inc(cls_m[tr_way][tr_set]);
      flt_m[tr_way][tr_set] <= tr_mispred ? sat_inc(flt_m[tr_way][tr_set]) : sat_dec(flt_m[tr_way][tr_set]);
      if (tr_dep) begin
        fwd_m[tr_way][tr_set] <= tr_fwd;
        spc_m[tr_way][tr_set] <= tr_store_pc;
      end
    end else if (do_alloc) begin
      tag_m[vic_way][tr_set] <= tr_pc[PC_W-1:IDX_W];
      cls_m[vic_way][tr_set] <= 2'd1;
      flt_m[vic_way][tr_set] <= 2'd0;
      fwd_m[vic_way][tr_set] <= tr_fwd;
      spc_m[vic_way][tr_set] <= tr_store_pc;
    end
  end

endmodule
