// Speculative memory access unit for an x86 superscalar core.
//
// The unit sits beside the load/store unit and makes its predictions after
// dispatch (delayed prediction): when a memory operation is dispatched into
// the unified memory access buffer, its PC looks up, in the same cycle,
//   - the address prediction table (2-stride predictor), which supplies a
//     predicted data address so the load need not wait for the long x86
//     address calculation, and
//   - the selective dependency/forwarding prediction table (store-load pair
//     predictor with classify and filter counters), which says whether the
//     load depends on an older store and whether that store can forward.
// The buffer searches itself for the predicted store, the bypass logic
// combines both answers into a scheduling mode, and the entry is written at
// the next edge with its prediction.  The buffer then schedules, forwards,
// validates and sends back the load values (aggressive or conservative
// send-back, SEND_BACK), and trains the tables: the address table when the
// computed address arrives, the dependency table at the first validation.
//
// Interface: dispatch, address generation, store data, a data cache with a
// one-cycle read and a write port used at store commit, result write back,
// commit handshake with the reorder buffer, recovery request and event
// pulses.  pred_ready rises when the tables have finished clearing after
// reset (1024 cycles at the default size); until then every load is simply
// predicted as a table miss.  Front end, reorder buffer, reservation stations, address
// generation and the data cache itself are outside this unit.
// Table sizes (4K entries, 4-way) and the default policy (selective
// dependency/forwarding prediction with address prediction, delayed
// prediction, aggressive send-back) follow the published design; the buffer
// depth and all port protocols are this design's choices.
module smau_top
  import smau_pkg::*;
#(
  parameter int unsigned APT_ENTRIES = 4096,
  parameter int unsigned APT_WAYS    = 4,
  parameter int unsigned DPT_ENTRIES = 4096,
  parameter int unsigned DPT_WAYS    = 4,
  parameter int unsigned UMAB_DEPTH  = 16,
  parameter dep_policy_e POLICY      = POL_SDP,
  parameter bit          USE_AP      = 1'b1,
  parameter send_back_e  SEND_BACK   = SB_ASB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              disp_valid,
  input  logic              disp_is_store,
  input  logic [PC_W-1:0]   disp_pc,
  input  logic [TAG_W-1:0]  disp_tag,
  input  size_t             disp_size,
  output logic              disp_ready,
  output logic [$clog2(UMAB_DEPTH)-1:0] disp_idx,
  input  logic              agu_valid,
  input  logic [$clog2(UMAB_DEPTH)-1:0] agu_idx,
  input  logic [ADDR_W-1:0] agu_addr,
  input  logic              std_valid,
  input  logic [$clog2(UMAB_DEPTH)-1:0] std_idx,
  input  logic [DATA_W-1:0] std_data,
  output logic              dc_rd_req,
  output logic [ADDR_W-1:0] dc_rd_addr,
  input  logic [DATA_W-1:0] dc_rd_data,
  output logic              dc_wr_req,
  output logic [ADDR_W-1:0] dc_wr_addr,
  output logic [DATA_W-1:0] dc_wr_data,
  output logic [3:0]        dc_wr_mask,
  output logic              wb_valid,
  output logic [TAG_W-1:0]  wb_tag,
  output logic [DATA_W-1:0] wb_data,
  output logic              head_ready,
  output logic [TAG_W-1:0]  head_tag,
  input  logic              commit,
  output logic              recover_valid,
  output logic [TAG_W-1:0]  recover_tag,
  output logic              pred_ready,   // prediction tables initialised
  output umab_events_t      ev
);

  // address prediction
  logic              ap_hit;
  logic [ADDR_W-1:0] ap_addr;
  logic              apt_up_valid;
  logic [PC_W-1:0]   apt_up_pc;
  logic [ADDR_W-1:0] apt_up_addr;
  logic              apt_ready, dpt_ready;

  assign pred_ready = apt_ready && dpt_ready;

  apt #(.ENTRIES(APT_ENTRIES), .WAYS(APT_WAYS)) u_apt (
    .clk, .rst_n,
    .lk_pc(disp_pc), .lk_hit(ap_hit), .lk_addr(ap_addr), .ready(apt_ready),
    .up_valid(apt_up_valid), .up_pc(apt_up_pc), .up_addr(apt_up_addr)
  );

  // dependency/forwarding prediction
  logic              dp_hit, dp_dep, dp_filtered, dp_fwd;
  logic [PC_W-1:0]   dp_fwd_pc;
  logic              tr_valid, tr_dep, tr_fwd, tr_mispred;
  logic [PC_W-1:0]   tr_pc, tr_store_pc;

  sdpt #(.ENTRIES(DPT_ENTRIES), .WAYS(DPT_WAYS), .POLICY(POLICY)) u_sdpt (
    .clk, .rst_n,
    .lk_pc(disp_pc), .lk_hit(dp_hit), .lk_dep(dp_dep), .lk_filtered(dp_filtered),
    .lk_fwd(dp_fwd), .lk_fwd_pc(dp_fwd_pc), .ready(dpt_ready),
    .tr_valid, .tr_pc, .tr_dep, .tr_fwd, .tr_store_pc, .tr_mispred
  );

  // bypass logic
  logic     pair_hit, forwarding;
  ld_mode_e mode;

  bypass_logic u_bypass (
    .pred_dep(dp_dep), .pred_filtered(dp_filtered), .pred_fwd(dp_fwd),
    .pair_hit, .forwarding, .mode
  );

  // unified memory access buffer
  umab #(.DEPTH(UMAB_DEPTH), .SEND_BACK(SEND_BACK)) u_umab (
    .clk, .rst_n,
    .disp_valid, .disp_is_store, .disp_pc, .disp_tag, .disp_size,
    .disp_pa_ok(USE_AP && ap_hit), .disp_pa(ap_addr),
    .disp_pdep(dp_dep && dp_hit), .disp_pair_pc(dp_fwd_pc), .disp_mode(mode),
    .pair_hit, .disp_ready, .disp_idx,
    .agu_valid, .agu_idx, .agu_addr,
    .std_valid, .std_idx, .std_data,
    .dc_rd_req, .dc_rd_addr, .dc_rd_data,
    .dc_wr_req, .dc_wr_addr, .dc_wr_data, .dc_wr_mask,
    .wb_valid, .wb_tag, .wb_data,
    .head_ready, .head_tag, .commit,
    .recover_valid, .recover_tag,
    .apt_up_valid, .apt_up_pc, .apt_up_addr,
    .tr_valid, .tr_pc, .tr_dep, .tr_fwd, .tr_store_pc, .tr_mispred,
    .ev
  );

endmodule
