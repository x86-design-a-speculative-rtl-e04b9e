// Unified memory access buffer (UMAB) with speculative load scheduling.
//
// The buffer keeps every load and store of the instruction window in
// program order (a circular queue of DEPTH entries).  Predictions are made
// after dispatch: a load enters the buffer together with its predicted
// address (from the address prediction table) and the scheduling mode
// chosen by the bypass logic from the dependency/forwarding prediction.
// At dispatch the buffer also searches itself for the youngest older store
// whose PC equals the predicted pair PC (pair_hit / pair_idx), which the
// bypass logic needs.
//
// Each cycle the oldest load that may proceed obtains its value:
//   MODE_FORWARD : from its paired store as soon as that store's data is
//                  present, even before any address is known;
//   MODE_BYPASS  : at its computed address or, before that is known, its
//                  predicted address, ignoring older stores whose address
//                  is still unknown;
//   MODE_CONS    : as BYPASS, but only once every older store address is
//                  known (the conventional load-forwarding policy);
//   MODE_WAIT    : not before its paired store has left the buffer, then as
//                  BYPASS.
// In the last three cases an older store with a known overlapping address
// forwards its value if it covers the load and its data is present; a
// partially overlapping store makes the load wait until it has committed.
// Otherwise the load reads the data cache (one read per cycle, data returns
// on the next cycle).
//
// Validation: when a load's own address and all older store addresses are
// known, the buffer works out where the value should have come from (the
// youngest older overlapping store, or the cache) and compares it with what
// the load used.  A stale flag, set when an overlapping older store commits
// after the load read the cache, also counts as wrong.  One load is
// validated per cycle; the first validation trains the dependency table.
//
// Send-back (SEND_BACK): with SB_ASB a value is written back as soon as it
// is obtained; a wrong value that was already written back squashes every
// younger buffer entry and raises recover_valid with the load's tag, and the
// load re-executes conventionally.  With SB_CSB a value is written back only
// after validation, so a wrong value just re-executes the load.  Stores
// write the cache in order at commit.  A store does not commit while an
// unvalidated load still holds a value forwarded from it.
//
// Interface: dispatch (disp_*, disp_ready, disp_idx), address from the
// address generation unit (agu_*), store data (std_*), data cache read and
// write ports (dc_*), result write back (wb_*, one per cycle), commit
// handshake (head_ready / commit), recovery (recover_*), training outputs
// for the two prediction tables (apt_up_*, tr_*) and event pulses.
// The scheduling policies, prediction after dispatch and both send-back
// strategies follow the published design; the buffer depth, the one action
// per cycle of each kind, the word-granular access model and the exact
// validation rules are this design's choices.
module umab
  import smau_pkg::*;
#(
  parameter int unsigned DEPTH     = 16,
  parameter send_back_e  SEND_BACK = SB_ASB
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              disp_valid,
  input  logic              disp_is_store,
  input  logic [PC_W-1:0]   disp_pc,
  input  logic [TAG_W-1:0]  disp_tag,
  input  size_t             disp_size,
  input  logic              disp_pa_ok,      // predicted address valid
  input  logic [ADDR_W-1:0] disp_pa,
  input  logic              disp_pdep,       // raw dependence prediction
  input  logic [PC_W-1:0]   disp_pair_pc,    // predicted paired store PC
  input  ld_mode_e          disp_mode,       // from the bypass logic
  output logic              pair_hit,
  output logic              disp_ready,
  output logic [$clog2(DEPTH)-1:0] disp_idx,
  // address generation and store data
  input  logic              agu_valid,
  input  logic [$clog2(DEPTH)-1:0] agu_idx,
  input  logic [ADDR_W-1:0] agu_addr,
  input  logic              std_valid,
  input  logic [$clog2(DEPTH)-1:0] std_idx,
  input  logic [DATA_W-1:0] std_data,
  // data cache
  output logic              dc_rd_req,
  output logic [ADDR_W-1:0] dc_rd_addr,      // word aligned
  input  logic [DATA_W-1:0] dc_rd_data,      // one cycle after dc_rd_req
  output logic              dc_wr_req,
  output logic [ADDR_W-1:0] dc_wr_addr,      // word aligned
  output logic [DATA_W-1:0] dc_wr_data,
  output logic [3:0]        dc_wr_mask,
  // write back of loaded values
  output logic              wb_valid,
  output logic [TAG_W-1:0]  wb_tag,
  output logic [DATA_W-1:0] wb_data,
  // commit
  output logic              head_ready,
  output logic [TAG_W-1:0]  head_tag,
  input  logic              commit,
  // recovery
  output logic              recover_valid,
  output logic [TAG_W-1:0]  recover_tag,
  // training
  output logic              apt_up_valid,
  output logic [PC_W-1:0]   apt_up_pc,
  output logic [ADDR_W-1:0] apt_up_addr,
  output logic              tr_valid,
  output logic [PC_W-1:0]   tr_pc,
  output logic              tr_dep,
  output logic              tr_fwd,
  output logic [PC_W-1:0]   tr_store_pc,
  output logic              tr_mispred,
  // statistics
  output umab_events_t      ev
);

  localparam int unsigned IW = $clog2(DEPTH);
  typedef logic [IW-1:0] idx_t;

  // ---------------- entry state ----------------
  logic              valid_q    [DEPTH];
  logic              store_q    [DEPTH];
  logic [PC_W-1:0]   pc_q       [DEPTH];
  logic [TAG_W-1:0]  tag_q      [DEPTH];
  size_t             size_q     [DEPTH];
  logic              aok_q      [DEPTH];   // computed address known
  logic [ADDR_W-1:0] addr_q     [DEPTH];
  logic              dok_q      [DEPTH];   // store data / load value present
  logic [DATA_W-1:0] data_q     [DEPTH];
  logic              paok_q     [DEPTH];   // predicted address usable
  logic [ADDR_W-1:0] pa_q       [DEPTH];
  ld_mode_e          mode_q     [DEPTH];
  idx_t              pair_q     [DEPTH];
  logic              plive_q    [DEPTH];   // paired store still in the buffer
  logic              pdep_q     [DEPTH];
  logic [PC_W-1:0]   ppc_q      [DEPTH];
  logic              busy_q     [DEPTH];   // cache read in flight
  logic              ufwd_q     [DEPTH];   // value came from a store
  idx_t              usrc_q     [DEPTH];
  logic [ADDR_W-1:0] uaddr_q    [DEPTH];
  logic              stale_q    [DEPTH];
  logic [PC_W-1:0]   spc_q      [DEPTH];
  logic              scov_q     [DEPTH];
  logic              ver_q      [DEPTH];
  logic              wbp_q      [DEPTH];   // write back pending
  logic              sent_q     [DEPTH];
  logic              trained_q  [DEPTH];

  logic [IW:0] head_q, tail_q;
  logic        rd_q;
  idx_t        rd_idx_q;

  idx_t pos [DEPTH];
  always_comb
    for (int k = 0; k < DEPTH; k++) pos[k] = idx_t'(k) - head_q[IW-1:0];

  wire full = (head_q[IW] != tail_q[IW]) && (head_q[IW-1:0] == tail_q[IW-1:0]);

  // value of the load (lofs, lsz) taken from a store's register value
  function automatic logic [DATA_W-1:0] fwd_value(input logic [DATA_W-1:0] sdata, input logic [1:0] sofs,
                                                  input logic [1:0] lofs, input size_t lsz);
    return extract(sdata << (8 * sofs), lofs, lsz);
  endfunction

  idx_t head_i;
  logic do_commit;
  assign head_i = head_q[IW-1:0];

  // ---------------- dispatch-time pair search ----------------
  // (a store committing in this cycle is no longer a candidate)
  idx_t pair_idx;
  always_comb begin
    pair_hit = 1'b0;
    pair_idx = '0;
    for (int j = 0; j < DEPTH; j++) begin
      if (valid_q[j] && store_q[j] && pc_q[j] == disp_pair_pc &&
          !(do_commit && idx_t'(j) == head_i) &&
          (!pair_hit || pos[j] > pos[pair_idx])) begin
        pair_hit = 1'b1;
        pair_idx = idx_t'(j);
      end
    end
  end

  // ---------------- per-load analysis ----------------
  logic              is_elig   [DEPTH];
  logic              is_fwd    [DEPTH];
  idx_t              is_src    [DEPTH];
  logic [DATA_W-1:0] is_val    [DEPTH];
  logic [ADDR_W-1:0] is_addr   [DEPTH];
  logic              is_spec   [DEPTH];   // an older store address unknown
  logic              is_pfwd   [DEPTH];   // forwarding from the paired store
  logic              v_elig    [DEPTH];
  logic              v_good    [DEPTH];
  logic              v_abad    [DEPTH];
  logic              v_dep     [DEPTH];
  logic              v_cov     [DEPTH];
  logic [PC_W-1:0]   v_spc     [DEPTH];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      logic              eff_ok, unk, yf, tf, ok;
      logic [ADDR_W-1:0] eff;
      logic [3:0]        lm, am, sm, ym, tm;
      idx_t              yi, ti;
      ld_mode_e          m;
      eff_ok = aok_q[i] || paok_q[i];
      eff    = aok_q[i] ? addr_q[i] : pa_q[i];
      lm     = byte_mask(eff[1:0], size_q[i]);
      am     = byte_mask(addr_q[i][1:0], size_q[i]);
      unk = 1'b0; yf = 1'b0; tf = 1'b0; yi = '0; ti = '0; ym = '0; tm = '0;
      for (int j = 0; j < DEPTH; j++) begin
        if (valid_q[j] && store_q[j] && pos[j] < pos[i]) begin
          sm = byte_mask(addr_q[j][1:0], size_q[j]);
          if (!aok_q[j]) unk = 1'b1;
          else begin
            if (addr_q[j][ADDR_W-1:2] == eff[ADDR_W-1:2] && (sm & lm) != 4'd0 && (!yf || pos[j] > pos[yi])) begin
              yf = 1'b1; yi = idx_t'(j); ym = sm;
            end
            if (addr_q[j][ADDR_W-1:2] == addr_q[i][ADDR_W-1:2] && (sm & am) != 4'd0 && (!tf || pos[j] > pos[ti])) begin
              tf = 1'b1; ti = idx_t'(j); tm = sm;
            end
          end
        end
      end

      // -------- issue --------
      m = mode_q[i];
      if ((m == MODE_FORWARD || m == MODE_WAIT) && !plive_q[i]) m = MODE_BYPASS;
      ok = 1'b0;
      is_fwd[i]  = 1'b0;
      is_pfwd[i] = 1'b0;
      is_src[i]  = '0;
      is_val[i]  = '0;
      is_addr[i] = eff;
      is_spec[i] = unk;
      case (m)
        MODE_FORWARD: begin
          if (dok_q[pair_q[i]]) begin
            ok = 1'b1; is_fwd[i] = 1'b1; is_pfwd[i] = 1'b1; is_src[i] = pair_q[i];
            if (aok_q[pair_q[i]] && eff_ok)
              is_val[i] = fwd_value(data_q[pair_q[i]], addr_q[pair_q[i]][1:0], eff[1:0], size_q[i]);
            else
              is_val[i] = extract(data_q[pair_q[i]], 2'd0, size_q[i]);
          end
        end
        MODE_WAIT: ok = 1'b0;
        default: begin
          if (eff_ok && (m == MODE_BYPASS || !unk)) begin
            if (yf) begin
              if ((lm & ~ym) == 4'd0 && dok_q[yi]) begin
                ok = 1'b1; is_fwd[i] = 1'b1; is_src[i] = yi;
                is_val[i] = fwd_value(data_q[yi], addr_q[yi][1:0], eff[1:0], size_q[i]);
              end
            end else begin
              ok = 1'b1;
            end
          end
        end
      endcase
      is_elig[i] = valid_q[i] && !store_q[i] && !dok_q[i] && !busy_q[i] && ok;

      // -------- validation --------
      v_elig[i] = valid_q[i] && !store_q[i] && dok_q[i] && !ver_q[i] && aok_q[i] && !unk;
      v_good[i] = 1'b0;
      if (tf) begin
        if ((am & ~tm) != 4'd0) begin
          v_good[i] = 1'b0;                     // partial overlap: value cannot be right
        end else if (!dok_q[ti]) begin
          v_elig[i] = 1'b0;                     // wait for the store data
        end else begin
          v_good[i] = !stale_q[i] && ufwd_q[i] && usrc_q[i] == ti &&
                      data_q[i] == fwd_value(data_q[ti], addr_q[ti][1:0], addr_q[i][1:0], size_q[i]);
        end
      end else begin
        v_good[i] = !stale_q[i] && !ufwd_q[i] && uaddr_q[i] == addr_q[i];
      end
      v_abad[i] = !ufwd_q[i] && uaddr_q[i] != addr_q[i];
      v_dep[i]  = tf || stale_q[i];
      v_cov[i]  = tf ? ((am & ~tm) == 4'd0) : scov_q[i];
      v_spc[i]  = tf ? pc_q[ti] : spc_q[i];
    end
  end

  // ---------------- selection: oldest first ----------------
  logic is_any, v_any, wb_any;
  idx_t is_sel, v_sel, wb_sel;
  always_comb begin
    is_any = 1'b0; v_any = 1'b0; wb_any = 1'b0;
    is_sel = '0;   v_sel = '0;   wb_sel = '0;
    for (int k = 0; k < DEPTH; k++) begin
      if (is_elig[k] && (!is_any || pos[k] < pos[is_sel])) begin is_any = 1'b1; is_sel = idx_t'(k); end
      if (v_elig[k]  && (!v_any  || pos[k] < pos[v_sel]))  begin v_any  = 1'b1; v_sel  = idx_t'(k); end
      if (valid_q[k] && wbp_q[k] && (!wb_any || pos[k] < pos[wb_sel])) begin wb_any = 1'b1; wb_sel = idx_t'(k); end
    end
  end

  // ---------------- outputs ----------------
  logic fwd_block;   // an unvalidated load still holds a value from the head store
  always_comb begin
    fwd_block = is_any && is_fwd[is_sel] && is_src[is_sel] == head_i;
    for (int k = 0; k < DEPTH; k++)
      if (valid_q[k] && !store_q[k] && dok_q[k] && !ver_q[k] && ufwd_q[k] && usrc_q[k] == head_i)
        fwd_block = 1'b1;
  end

  logic v_bad, v_recover, v_fire;
  assign v_fire    = v_any;
  assign v_bad     = v_any && !v_good[v_sel];
  assign v_recover = v_bad && (SEND_BACK == SB_ASB) && (sent_q[v_sel] || (wb_any && wb_sel == v_sel));

  assign recover_valid = v_recover;
  assign recover_tag   = tag_q[v_sel];

  assign disp_ready = !full && !v_recover;
  assign disp_idx   = tail_q[IW-1:0];

  assign head_ready = valid_q[head_i] &&
                      (store_q[head_i] ? (aok_q[head_i] && dok_q[head_i] && !fwd_block)
                                       : (ver_q[head_i] && !wbp_q[head_i]));
  assign head_tag   = tag_q[head_i];

  assign do_commit = commit && head_ready;
  assign dc_wr_req  = do_commit && store_q[head_i];
  assign dc_wr_addr = {addr_q[head_i][ADDR_W-1:2], 2'b00};
  assign dc_wr_mask = byte_mask(addr_q[head_i][1:0], size_q[head_i]);
  assign dc_wr_data = data_q[head_i] << (8 * addr_q[head_i][1:0]);

  wire do_read = is_any && !is_fwd[is_sel];
  assign dc_rd_req  = do_read;
  assign dc_rd_addr = {is_addr[is_sel][ADDR_W-1:2], 2'b00};

  assign wb_valid = wb_any;
  assign wb_tag   = tag_q[wb_sel];
  assign wb_data  = data_q[wb_sel];

  assign apt_up_valid = agu_valid && valid_q[agu_idx] && !store_q[agu_idx];
  assign apt_up_pc    = pc_q[agu_idx];
  assign apt_up_addr  = agu_addr;

  wire   dep_wrong    = (pdep_q[v_sel] != v_dep[v_sel]) ||
                        (pdep_q[v_sel] && v_dep[v_sel] && ppc_q[v_sel] != v_spc[v_sel]);
  assign tr_valid     = v_fire && !trained_q[v_sel];
  assign tr_pc        = pc_q[v_sel];
  assign tr_dep       = v_dep[v_sel];
  assign tr_fwd       = v_cov[v_sel];
  assign tr_store_pc  = v_spc[v_sel];
  assign tr_mispred   = dep_wrong;

  wire do_disp = disp_valid && disp_ready;
  logic stale_any;
  always_comb begin
    stale_any = 1'b0;
    if (dc_wr_req)
      for (int k = 0; k < DEPTH; k++)
        if (valid_q[k] && !store_q[k] && (dok_q[k] || busy_q[k]) && !ufwd_q[k] && !ver_q[k] &&
            uaddr_q[k][ADDR_W-1:2] == addr_q[head_i][ADDR_W-1:2] &&
            (byte_mask(uaddr_q[k][1:0], size_q[k]) & dc_wr_mask) != 4'd0)
          stale_any = 1'b1;
  end

  always_comb begin
    ev            = '0;
    ev.spec_issue = is_any && is_spec[is_sel];
    ev.spec_fwd   = is_any && is_pfwd[is_sel];
    ev.std_fwd    = is_any && is_fwd[is_sel] && !is_pfwd[is_sel];
    ev.pred_addr  = do_read && !aok_q[is_sel];
    ev.filtered   = do_disp && !disp_is_store && disp_mode == MODE_CONS;
    ev.wait_pair  = do_disp && !disp_is_store && disp_mode == MODE_WAIT;
    ev.addr_miss  = v_bad && v_abad[v_sel];
    ev.dep_miss   = v_bad && !v_abad[v_sel];
    ev.recover    = v_recover;
    ev.replay     = v_bad && !v_recover;
    ev.stale      = stale_any;
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q   <= '0;
      tail_q   <= '0;
      rd_q     <= 1'b0;
      rd_idx_q <= '0;
      for (int k = 0; k < DEPTH; k++) begin
        valid_q[k] <= 1'b0; store_q[k] <= 1'b0; aok_q[k] <= 1'b0; dok_q[k] <= 1'b0;
        paok_q[k] <= 1'b0; plive_q[k] <= 1'b0; busy_q[k] <= 1'b0; ufwd_q[k] <= 1'b0;
        stale_q[k] <= 1'b0; ver_q[k] <= 1'b0; wbp_q[k] <= 1'b0; sent_q[k] <= 1'b0;
        trained_q[k] <= 1'b0; pc_q[k] <= '0; tag_q[k] <= '0; size_q[k] <= '0;
        addr_q[k] <= '0; data_q[k] <= '0; pa_q[k] <= '0; mode_q[k] <= MODE_BYPASS;
        pair_q[k] <= '0; pdep_q[k] <= 1'b0; ppc_q[k] <= '0; usrc_q[k] <= '0;
        uaddr_q[k] <= '0; spc_q[k] <= '0; scov_q[k] <= 1'b0;
      end
    end else begin
      // cache read issue and return
      rd_q     <= do_read;
      rd_idx_q <= is_sel;
      if (rd_q && valid_q[rd_idx_q] && busy_q[rd_idx_q]) begin
        busy_q[rd_idx_q] <= 1'b0;
        dok_q[rd_idx_q]  <= 1'b1;
        data_q[rd_idx_q] <= extract(dc_rd_data, uaddr_q[rd_idx_q][1:0], size_q[rd_idx_q]);
        if (SEND_BACK == SB_ASB) wbp_q[rd_idx_q] <= 1'b1;
      end
      if (is_any) begin
        uaddr_q[is_sel] <= is_addr[is_sel];
        if (is_fwd[is_sel]) begin
          dok_q[is_sel]  <= 1'b1;
          data_q[is_sel] <= is_val[is_sel];
          ufwd_q[is_sel] <= 1'b1;
          usrc_q[is_sel] <= is_src[is_sel];
          if (SEND_BACK == SB_ASB) wbp_q[is_sel] <= 1'b1;
        end else begin
          busy_q[is_sel] <= 1'b1;
          ufwd_q[is_sel] <= 1'b0;
        end
      end

      // address generation and store data
      if (agu_valid) begin
        aok_q[agu_idx]  <= 1'b1;
        addr_q[agu_idx] <= agu_addr;
      end
      if (std_valid) begin
        dok_q[std_idx]  <= 1'b1;
        data_q[std_idx] <= std_data;
      end

      // write back
      if (wb_any) begin
        wbp_q[wb_sel]  <= 1'b0;
        sent_q[wb_sel] <= 1'b1;
      end

      // commit
      if (do_commit) begin
        valid_q[head_i] <= 1'b0;
        head_q          <= head_q + 1'b1;
        for (int k = 0; k < DEPTH; k++) begin
          if (valid_q[k] && !store_q[k] && plive_q[k] && pair_q[k] == head_i) plive_q[k] <= 1'b0;
        end
        if (store_q[head_i]) begin
          for (int k = 0; k < DEPTH; k++)
            if (valid_q[k] && !store_q[k] && (dok_q[k] || busy_q[k]) && !ufwd_q[k] && !ver_q[k] &&
                uaddr_q[k][ADDR_W-1:2] == addr_q[head_i][ADDR_W-1:2] &&
                (byte_mask(uaddr_q[k][1:0], size_q[k]) & dc_wr_mask) != 4'd0) begin
              stale_q[k] <= 1'b1;
              spc_q[k]   <= pc_q[head_i];
              scov_q[k]  <= (byte_mask(uaddr_q[k][1:0], size_q[k]) & ~dc_wr_mask) == 4'd0;
            end
        end
      end

      // validation
      if (v_fire) begin
        trained_q[v_sel] <= 1'b1;
        if (!v_bad) begin
          ver_q[v_sel] <= 1'b1;
          if (SEND_BACK == SB_CSB) wbp_q[v_sel] <= 1'b1;
        end else begin
          // re-execute conventionally at the computed address
          dok_q[v_sel]   <= 1'b0;
          ufwd_q[v_sel]  <= 1'b0;
          stale_q[v_sel] <= 1'b0;
          wbp_q[v_sel]   <= 1'b0;
          sent_q[v_sel]  <= 1'b0;
          paok_q[v_sel]  <= 1'b0;
          mode_q[v_sel]  <= MODE_CONS;
          if (v_recover) begin
            for (int k = 0; k < DEPTH; k++)
              if (pos[k] > pos[v_sel]) begin
                valid_q[k] <= 1'b0;
                busy_q[k]  <= 1'b0;
                wbp_q[k]   <= 1'b0;
              end
            tail_q <= head_q + (IW+1)'(pos[v_sel]) + 1'b1;
          end
        end
      end

      // dispatch (never in a recovery cycle)
      if (do_disp) begin
        valid_q[disp_idx]   <= 1'b1;
        store_q[disp_idx]   <= disp_is_store;
        pc_q[disp_idx]      <= disp_pc;
        tag_q[disp_idx]     <= disp_tag;
        size_q[disp_idx]    <= disp_size;
        aok_q[disp_idx]     <= 1'b0;
        dok_q[disp_idx]     <= 1'b0;
        paok_q[disp_idx]    <= !disp_is_store && disp_pa_ok;
        pa_q[disp_idx]      <= disp_pa;
        mode_q[disp_idx]    <= disp_is_store ? MODE_BYPASS : disp_mode;
        pair_q[disp_idx]    <= pair_idx;
        plive_q[disp_idx]   <= !disp_is_store && pair_hit &&
                               (disp_mode == MODE_FORWARD || disp_mode == MODE_WAIT);
        pdep_q[disp_idx]    <= !disp_is_store && disp_pdep;
        ppc_q[disp_idx]     <= disp_pair_pc;
        busy_q[disp_idx]    <= 1'b0;
        ufwd_q[disp_idx]    <= 1'b0;
        stale_q[disp_idx]   <= 1'b0;
        ver_q[disp_idx]     <= 1'b0;
        wbp_q[disp_idx]     <= 1'b0;
        sent_q[disp_idx]    <= 1'b0;
        trained_q[disp_idx] <= 1'b0;
        tail_q              <= tail_q + 1'b1;
      end
    end
  end

  // ---------------- interface rules ----------------
  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("umab: DEPTH must be a power of two");

  a_commit_ready: assert property (@(posedge clk) disable iff (!rst_n) commit |-> head_ready)
    else $error("umab: commit without head_ready");
  a_disp_ready: assert property (@(posedge clk) disable iff (!rst_n) disp_valid |-> disp_ready)
    else $error("umab: dispatch while not ready");
  a_agu_live: assert property (@(posedge clk) disable iff (!rst_n) agu_valid |-> valid_q[agu_idx])
    else $error("umab: address for an empty entry");
  a_std_store: assert property (@(posedge clk) disable iff (!rst_n) std_valid |-> valid_q[std_idx] && store_q[std_idx])
    else $error("umab: store data for a non-store entry");

endmodule
