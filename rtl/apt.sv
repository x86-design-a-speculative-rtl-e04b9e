// Address prediction table (APT): a 2-stride data address predictor for loads.
//
// Each entry, selected by the load's PC, holds a valid bit, a tag, the last
// data address the load used and two strides.  stride2 always takes the most
// recently observed stride (new address minus last address); stride1 is
// overwritten with it only when the new stride equals stride2, that is when
// the same stride has been seen twice in a row.  The predicted address is
// last address + stride1.  The table is a set-associative cache of
// ENTRIES entries in WAYS ways (4K entries, 4-way by default, the size the
// design is evaluated at).
//
// Interface and timing:
//   lookup  : lk_pc in, lk_hit / lk_addr out in the same cycle (asynchronous
//             read of the selected set).
//   update  : up_valid with up_pc and the load's computed address up_addr,
//             written at the next rising edge.  A hit updates the strides
//             and the last address; a miss allocates a way (an invalid way
//             first, otherwise the set's round-robin victim) with last =
//             up_addr and both strides zero.
// After reset the valid bits and victim pointers, which live in memory like
// the rest of the table, are cleared by a sweep of one set per cycle; ready
// rises when it is done (SETS cycles), and until then every lookup misses
// and updates are dropped.  The entry fields, the
// stride rule and the adder follow the published block diagram; the index
// and tag split of the PC, the replacement policy and the full-width
// strides are this design's choices.
module apt
  import smau_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned WAYS    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction lookup
  input  logic [PC_W-1:0]   lk_pc,
  output logic              lk_hit,
  output logic [ADDR_W-1:0] lk_addr,
  output logic              ready,       // reset sweep finished
  // training with the computed address
  input  logic              up_valid,
  input  logic [PC_W-1:0]   up_pc,
  input  logic [ADDR_W-1:0] up_addr
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_B = PC_W - IDX_W;

  logic [WAYS-1:0]   valid_q [SETS];   // in memory, cleared by the sweep
  logic [WAY_W-1:0]  rr_q    [SETS];
  logic              clr_q;            // reset sweep in progress
  logic [IDX_W-1:0]  clr_idx_q;
  logic [TAG_B-1:0]  tag_m   [WAYS][SETS];
  logic [ADDR_W-1:0] last_m  [WAYS][SETS];
  logic [ADDR_W-1:0] str1_m  [WAYS][SETS];
  logic [ADDR_W-1:0] str2_m  [WAYS][SETS];

  function automatic logic [IDX_W-1:0] set_of(input logic [PC_W-1:0] pc);
    return pc[IDX_W-1:0];
  endfunction
  function automatic logic [TAG_B-1:0] tag_of(input logic [PC_W-1:0] pc);
    return pc[PC_W-1:IDX_W];
  endfunction

  assign ready = !clr_q;

  // ---------------- lookup ----------------
  logic [IDX_W-1:0] lk_set;
  always_comb begin
    lk_set  = set_of(lk_pc);
    lk_hit  = 1'b0;
    lk_addr = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!clr_q && valid_q[lk_set][w] && tag_m[w][lk_set] == tag_of(lk_pc)) begin
        lk_hit  = 1'b1;
        lk_addr = last_m[w][lk_set] + str1_m[w][lk_set];
      end
    end
  end

  // ---------------- update ----------------
  logic [IDX_W-1:0]  up_set;
  logic              up_hit;
  logic [WAY_W-1:0]  up_way;
  logic [WAY_W-1:0]  vic_way;
  logic              vic_free;
  logic [ADDR_W-1:0] new_stride;
  always_comb begin
    up_set   = set_of(up_pc);
    up_hit   = 1'b0;
    up_way   = '0;
    vic_free = 1'b0;
    vic_way  = rr_q[up_set];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[up_set][w]) begin
        vic_free = 1'b1;
        vic_way  = WAY_W'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[up_set][w] && tag_m[w][up_set] == tag_of(up_pc)) begin
        up_hit = 1'b1;
        up_way = WAY_W'(w);
      end
    end
    new_stride = up_addr - last_m[up_way][up_set];
  end

  // After reset the valid bits and victim pointers are cleared one set per
  // cycle (SETS cycles); meanwhile lookups miss and updates are dropped.
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
    end else if (up_valid && !up_hit) begin
      valid_q[up_set] <= valid_q[up_set] | (WAYS'(1) << vic_way);
      if (!vic_free) rr_q[up_set] <= WAY_W'((32'(rr_q[up_set]) + 1) % WAYS);
    end
  end

  always_ff @(posedge clk) begin
    if (up_valid && !clr_q) begin
      if (up_hit) begin
        last_m[up_way][up_set] <= up_addr;
        str2_m[up_way][up_set] <= new_stride;
        if (new_stride == str2_m[up_way][up_set]) str1_m[up_way][up_set] <= new_stride;
      end else begin
        tag_m [vic_way][up_set] <= tag_of(up_pc);
        last_m[vic_way][up_set] <= up_addr;
        str1_m[vic_way][up_set] <= '0;
        str2_m[vic_way][up_set] <= '0;
      end
    end
  end

endmodule
