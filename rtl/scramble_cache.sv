// Scramble Cache: a set-associative, write-back L1 data cache whose set
// index is remapped by a seeded permutation that is renewed periodically.
//
// Lookup. A request is taken in IDLE (cycle 0). In cycle 1 the set index s
// of the address is scrambled with the current seed, s_new = pi_r(s), and
// the set is read. In cycle 2 the tags are compared; a way hits only when
// it is valid, holds the line address and carries the current generation.
// A hit answers in cycle 2 (hit latency 2).
//
// History lookup (Algorithm 1 of the design). On a miss the victim way of
// s_new is chosen (an invalid way, else a pseudo-random one) and the
// history table is scanned from the newest old generation to the oldest,
// one entry per cycle: for generation c = c_glob-k the set
// s_old = pi_{r_c}(s) is read and searched for the line with generation c,
// but only when the entry's process identifier equals the requester's. A
// found line is moved to the victim way of s_new, re-tagged with the
// current generation, and its old slot is invalidated; a dirty victim goes
// to the write-back queue. The answer comes in the cycle after the move
// decision: latency 4 + k for a line found with entry k (no queue stall).
//
// Miss. When no generation holds the line, a dirty victim is queued for
// write-back, the cache waits until the queue has drained (so memory holds
// every older write), reads the line from memory and installs it with the
// current generation. Stores are write-allocate and merge their bytes into
// the line.
//
// Seed change. After REFRESH accepted requests, every REFRESH_CYCLES clock
// cycles (0, the default, turns this trigger off), on a rekey_req pulse, or
// (REKEY_ON_PID) when a request arrives from a process other than the one
// that owns the current generation, a sweep FSM reads every set in order
// and removes the lines whose generation equals (c_glob + 1) mod R, the
// generation about to be reused; the dirty ones are pushed to the
// write-back queue. The global generation counter then advances and the
// new seed (from the LFSR) and process identifier are written into the
// history table. The sweep takes 2 + 2^S cycles plus one per written-back
// line.
//
// Memory port. One line-wide request channel (valid/ready) shared by the
// write-back queue, which has priority, and line reads; read data returns
// on mem_resp_valid. Only one CPU request is handled at a time.
//
// What follows the description: the XOR-plus-swap permutation, per-line
// generations counted modulo R, the R-entry history of seeds with process
// identifiers, the newest-first scan at one cycle per entry, the hit
// latency of 2 cycles, the write-back of the expiring generation on a seed
// change and the LFSR. This design's own choices: line size, tags holding
// the whole line address, victim selection, moving the found line instead
// of swapping it with the victim, removing clean lines of the expiring
// generation too, the process-change trigger (the description names context switches and
// interrupts as triggers; here a context switch is recognised from req_pid,
// an interrupt is signalled on rekey_req), and all port protocols.
module scramble_cache
  import scramble_pkg::*;
#(
  parameter int unsigned ADDR_W       = ADDR_W_DEF,
  parameter int unsigned WORD_W       = WORD_W_DEF,
  parameter int unsigned LINE_BYTES   = LINE_BYTES_DEF,
  parameter int unsigned WAYS         = WAYS_DEF,
  parameter int unsigned S            = SET_BITS_DEF,
  parameter int unsigned R            = HIST_DEPTH_DEF,
  parameter int unsigned REFRESH      = REFRESH_DEF,
  parameter int unsigned REFRESH_CYCLES = 0,
  parameter int unsigned PID_W        = PID_W_DEF,
  parameter int unsigned WBQ_DEPTH    = WBQ_DEPTH_DEF,
  parameter int unsigned LFSR_W       = LFSR_W_DEF,
  parameter bit          REKEY_ON_PID = 1'b1,
  // derived, not meant to be overridden
  parameter int unsigned OFF_W        = $clog2(LINE_BYTES),
  parameter int unsigned LINE_W       = LINE_BYTES * 8,
  parameter int unsigned LADDR_W      = ADDR_W - OFF_W,
  parameter int unsigned BE_W         = WORD_W / 8,
  parameter int unsigned GEN_W        = (R > 1) ? $clog2(R) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LFSR_W-1:0]  rng_seed,       // entropy sampled at reset
  // CPU side
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [ADDR_W-1:0]  req_addr,       // byte address
  input  logic               req_we,
  input  logic [WORD_W-1:0]  req_wdata,
  input  logic [BE_W-1:0]    req_be,
  input  logic [PID_W-1:0]   req_pid,
  output logic               resp_valid,     // one-cycle pulse per request
  output logic [WORD_W-1:0]  resp_rdata,     // word after the access
  input  logic               rekey_req,      // pulse: change the seed (interrupt, context switch)
  // memory side
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [LADDR_W-1:0] mem_req_addr,   // line address
  output logic [LINE_W-1:0]  mem_req_wdata,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_rdata,
  // status
  output logic [GEN_W-1:0]   generation,
  output cache_events_t      events
);

  localparam int unsigned SEED_W = seed_width(S);
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WORDS  = LINE_W / WORD_W;
  localparam int unsigned WIDX_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned BOFF_W = $clog2(BE_W);
  localparam int unsigned CNT_W  = $clog2(REFRESH + 1);
  localparam int unsigned KW     = $clog2(R + 1);
  localparam int unsigned CYC_W  = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;

  typedef enum logic [3:0] {
    ST_IDLE, ST_LOOKUP, ST_COMPARE, ST_HIST, ST_MOVE,
    ST_EVICT, ST_WAIT_WB, ST_MEM_REQ, ST_MEM_WAIT,
    ST_SW_RD, ST_SW_CHK, ST_SW_ADV
  } state_t;

  // ------------------------------------------------------------------
  // Submodules
  // ------------------------------------------------------------------
  logic [LFSR_W-1:0] rnd;

  lfsr_prng #(.W(LFSR_W)) u_prng (
    .clk, .rst_n, .seed_in(rng_seed), .step(1'b1), .value(rnd)
  );

  logic              ht_advance;
  logic [PID_W-1:0]  ht_new_pid;
  logic [GEN_W-1:0]  c_glob, next_gen, ht_rd_gen;
  logic [SEED_W-1:0] cur_seed, ht_rd_seed;
  logic [PID_W-1:0]  cur_pid, ht_rd_pid;
  logic              ht_rd_valid;

  history_table #(.R(R), .SEED_W(SEED_W), .PID_W(PID_W), .GEN_W(GEN_W)) u_hist (
    .clk, .rst_n,
    .init_seed (rng_seed[SEED_W-1:0]),
    .init_pid  ('0),
    .advance   (ht_advance),
    .new_seed  (rnd[SEED_W-1:0]),
    .new_pid   (ht_new_pid),
    .c_glob, .next_gen, .cur_seed, .cur_pid,
    .rd_gen    (ht_rd_gen),
    .rd_valid  (ht_rd_valid),
    .rd_seed   (ht_rd_seed),
    .rd_pid    (ht_rd_pid)
  );

  logic                       arr_rd_en;
  logic [S-1:0]               arr_rd_set;
  logic [WAYS-1:0]            arr_valid, arr_dirty;
  logic [WAYS-1:0][GEN_W-1:0] arr_gen;
  logic [WAYS-1:0][LADDR_W-1:0] arr_tag;
  logic [LINE_W-1:0]          arr_data [WAYS];
  logic                       arr_wr_en;
  logic [S-1:0]               arr_wr_set;
  logic [WAY_W-1:0]           arr_wr_way;
  logic                       arr_wr_dirty;
  logic [LADDR_W-1:0]         arr_wr_tag;
  logic [LINE_W-1:0]          arr_wr_data;
  logic                       arr_inv_en;
  logic [S-1:0]               arr_inv_set;
  logic [WAYS-1:0]            arr_inv_mask;

  cache_arrays #(.S(S), .WAYS(WAYS), .TAG_W(LADDR_W), .GEN_W(GEN_W), .LINE_W(LINE_W)) u_arrays (
    .clk, .rst_n,
    .rd_en    (arr_rd_en),  .rd_set (arr_rd_set),
    .rd_valid (arr_valid),  .rd_dirty (arr_dirty), .rd_gen (arr_gen),
    .rd_tag   (arr_tag),    .rd_data (arr_data),
    .wr_en    (arr_wr_en),  .wr_set (arr_wr_set),  .wr_way (arr_wr_way),
    .wr_dirty (arr_wr_dirty), .wr_gen (c_glob),    .wr_tag (arr_wr_tag),
    .wr_data  (arr_wr_data),
    .inv_en   (arr_inv_en), .inv_set (arr_inv_set), .inv_mask (arr_inv_mask)
  );

  logic               wbq_push, wbq_push_ready, wbq_head_valid, wbq_pop, wbq_empty;
  logic [LADDR_W-1:0] wbq_push_addr, wbq_head_addr;
  logic [LINE_W-1:0]  wbq_push_data, wbq_head_data;

  wb_queue #(.DEPTH(WBQ_DEPTH), .ADDR_W(LADDR_W), .DATA_W(LINE_W)) u_wbq (
    .clk, .rst_n,
    .push (wbq_push), .push_addr (wbq_push_addr), .push_data (wbq_push_data),
    .push_ready (wbq_push_ready),
    .head_valid (wbq_head_valid), .head_addr (wbq_head_addr), .head_data (wbq_head_data),
    .pop (wbq_pop), .empty (wbq_empty)
  );

  // ------------------------------------------------------------------
  // Request registers and permutations
  // ------------------------------------------------------------------
  state_t            state_q, state_d;
  logic [ADDR_W-1:0] addr_q;
  logic              we_q;
  logic [WORD_W-1:0] wdata_q;
  logic [BE_W-1:0]   be_q;
  logic [PID_W-1:0]  pid_q;

  logic [S-1:0]       set_idx;
  logic [LADDR_W-1:0] line_addr;
  logic [WIDX_W-1:0]  word_idx;
  assign set_idx   = addr_q[OFF_W +: S];
  assign line_addr = addr_q[ADDR_W-1:OFF_W];
  if (WORDS > 1) begin : g_widx
    assign word_idx = addr_q[BOFF_W +: WIDX_W];
  end else begin : g_widx1
    assign word_idx = '0;
  end

  logic [S-1:0] s_new, s_hist;

  scramble_perm #(.S(S), .SEED_W(SEED_W)) u_perm_cur (
    .set_in (set_idx), .seed (cur_seed), .set_out (s_new)
  );

  scramble_perm #(.S(S), .SEED_W(SEED_W)) u_perm_hist (
    .set_in (set_idx), .seed (ht_rd_seed), .set_out (s_hist)
  );

  // (c - k) mod R
  function automatic logic [GEN_W-1:0] gen_sub(logic [GEN_W-1:0] c, logic [KW-1:0] k);
    int unsigned v;
    v = (int'(c) >= int'(k)) ? int'(c) - int'(k) : int'(c) + R - int'(k);
    return GEN_W'(v);
  endfunction

  // Write the bytes of the request word into a line.
  function automatic logic [LINE_W-1:0] merge_word(logic [LINE_W-1:0] line,
                                                   logic [WIDX_W-1:0] idx,
                                                   logic [WORD_W-1:0] data,
                                                   logic [BE_W-1:0]   be);
    logic [LINE_W-1:0] l;
    l = line;
    for (int unsigned b = 0; b < BE_W; b++)
      if (be[b]) l[int'(idx) * WORD_W + b * 8 +: 8] = data[b * 8 +: 8];
    return l;
  endfunction

  function automatic logic [WORD_W-1:0] pick_word(logic [LINE_W-1:0] line, logic [WIDX_W-1:0] idx);
    return line[int'(idx) * WORD_W +: WORD_W];
  endfunction

  // ------------------------------------------------------------------
  // Controller registers
  // ------------------------------------------------------------------
  logic [S-1:0]       snew_q;
  logic [WAY_W-1:0]   vway_q;
  logic               vdirty_q;      // victim valid and dirty
  logic [LADDR_W-1:0] vtag_q;
  logic [LINE_W-1:0]  vdata_q;

  logic [KW-1:0]      iss_k_q, cmp_k_q;
  logic               cmp_v_q, cmp_ok_q;
  logic [S-1:0]       cmp_set_q;
  logic [GEN_W-1:0]   cmp_gen_q;

  logic [S-1:0]       fset_q;
  logic [WAY_W-1:0]   fway_q;
  logic               fdirty_q;
  logic [LINE_W-1:0]  fdata_q;

  logic [CNT_W-1:0]   acc_q;
  logic               cnt_pend_q, ext_pend_q, pid_pend_q;
  logic [CYC_W-1:0]   cyc_q;
  logic               cyc_tick, cyc_pend_q;
  logic [PID_W-1:0]   rk_pid_q;
  logic [S-1:0]       sw_set_q;
  logic [WAYS-1:0]    sw_done_q;

  // ------------------------------------------------------------------
  // Combinational decode of the array read data
  // ------------------------------------------------------------------
  logic [WAYS-1:0]  hit_vec, hmatch_vec, old_vec, sw_pend;
  logic             hit_any, hmatch_any;
  logic [WAY_W-1:0] hit_way, hmatch_way, inv_way, victim_way, sw_way;
  logic             inv_any;

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      hit_vec[w]    = arr_valid[w] && arr_tag[w] == line_addr && arr_gen[w] == c_glob;
      hmatch_vec[w] = cmp_ok_q && arr_valid[w] && arr_tag[w] == line_addr && arr_gen[w] == cmp_gen_q;
      old_vec[w]    = arr_valid[w] && arr_gen[w] == next_gen;
    end
    sw_pend = old_vec & arr_dirty & ~sw_done_q;
    hit_any = 1'b0;    hit_way = '0;
    hmatch_any = 1'b0; hmatch_way = '0;
    inv_any = 1'b0;    inv_way = '0;
    sw_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])    begin hit_any = 1'b1;    hit_way = WAY_W'(w);    end
      if (hmatch_vec[w]) begin hmatch_any = 1'b1; hmatch_way = WAY_W'(w); end
      if (!arr_valid[w]) begin inv_any = 1'b1;    inv_way = WAY_W'(w);    end
      if (sw_pend[w])    sw_way = WAY_W'(w);
    end
    victim_way = inv_any ? inv_way : WAY_W'(rnd[SEED_W +: WAY_W] % WAYS);
  end

  logic rekey_now, pid_change;
  assign pid_change = REKEY_ON_PID && req_valid && req_pid != cur_pid;
  assign rekey_now  = cnt_pend_q || cyc_pend_q || ext_pend_q || pid_change;
  assign req_ready  = (state_q == ST_IDLE) && !rekey_now;

  // ------------------------------------------------------------------
  // Next-state and datapath control
  // ------------------------------------------------------------------
  logic ctrl_rd_valid;
  logic mem_rd_fire;
  logic move_inplace, move_need_wb;

  assign move_inplace = (fset_q == snew_q);
  assign move_need_wb = !move_inplace && vdirty_q;

  always_comb begin
    state_d       = state_q;
    arr_rd_en     = 1'b0;
    arr_rd_set    = s_new;
    arr_wr_en     = 1'b0;
    arr_wr_set    = snew_q;
    arr_wr_way    = vway_q;
    arr_wr_dirty  = 1'b0;
    arr_wr_tag    = line_addr;
    arr_wr_data   = fdata_q;
    arr_inv_en    = 1'b0;
    arr_inv_set   = fset_q;
    arr_inv_mask  = '0;
    wbq_push      = 1'b0;
    wbq_push_addr = vtag_q;
    wbq_push_data = vdata_q;
    ht_advance    = 1'b0;
    ht_new_pid    = rk_pid_q;
    ht_rd_gen     = gen_sub(c_glob, iss_k_q);
    ctrl_rd_valid = 1'b0;
    resp_valid    = 1'b0;
    resp_rdata    = '0;
    events        = '0;

    unique case (state_q)
      ST_IDLE: begin
        if (rekey_now)      state_d = ST_SW_RD;
        else if (req_valid) state_d = ST_LOOKUP;
      end

      ST_LOOKUP: begin
        arr_rd_en  = 1'b1;
        arr_rd_set = s_new;
        state_d    = ST_COMPARE;
      end

      ST_COMPARE: begin
        if (hit_any) begin
          arr_wr_en    = we_q;
          arr_wr_way   = hit_way;
          arr_wr_dirty = 1'b1;
          arr_wr_data  = we_q ? merge_word(arr_data[hit_way], word_idx, wdata_q, be_q)
                               : arr_data[hit_way];
          resp_valid   = 1'b1;
          resp_rdata   = pick_word(arr_wr_data, word_idx);
          events.hit   = 1'b1;
          state_d      = ST_IDLE;
        end else begin
          state_d = ST_HIST;
        end
      end

      ST_HIST: begin
        if (int'(iss_k_q) < R) begin
          arr_rd_en  = 1'b1;
          arr_rd_set = s_hist;
        end
        if (cmp_v_q && hmatch_any)                          state_d = ST_MOVE;
        else if (cmp_v_q && int'(cmp_k_q) == R - 1)         state_d = ST_EVICT;
        else if (!cmp_v_q && int'(iss_k_q) >= R)            state_d = ST_EVICT;
      end

      ST_MOVE: begin
        if (move_need_wb && !wbq_push_ready) begin
          events.wbq_stall = 1'b1;
        end else begin
          wbq_push        = move_need_wb;
          events.evict_wb = move_need_wb;
          arr_wr_en       = 1'b1;
          arr_wr_way      = move_inplace ? fway_q : vway_q;
          arr_wr_dirty    = fdirty_q || we_q;
          arr_wr_data     = we_q ? merge_word(fdata_q, word_idx, wdata_q, be_q) : fdata_q;
          arr_inv_en      = !move_inplace;
          arr_inv_set     = fset_q;
          arr_inv_mask    = WAYS'(1) << fway_q;
          resp_valid      = 1'b1;
          resp_rdata      = pick_word(arr_wr_data, word_idx);
          events.hist_hit     = 1'b1;
          events.hist_inplace = move_inplace;
          state_d         = ST_IDLE;
        end
      end

      ST_EVICT: begin
        if (vdirty_q) begin
          if (wbq_push_ready) begin
            wbq_push        = 1'b1;
            events.evict_wb = 1'b1;
            state_d         = ST_WAIT_WB;
          end else begin
            events.wbq_stall = 1'b1;
          end
        end else begin
          state_d = ST_WAIT_WB;
        end
      end

      ST_WAIT_WB: begin
        if (wbq_empty) state_d = ST_MEM_REQ;
      end

      ST_MEM_REQ: begin
        ctrl_rd_valid = 1'b1;
        if (mem_rd_fire) state_d = ST_MEM_WAIT;
      end

      ST_MEM_WAIT: begin
        if (mem_resp_valid) begin
          arr_wr_en    = 1'b1;
          arr_wr_way   = vway_q;
          arr_wr_dirty = we_q;
          arr_wr_data  = we_q ? merge_word(mem_resp_rdata, word_idx, wdata_q, be_q) : mem_resp_rdata;
          resp_valid   = 1'b1;
          resp_rdata   = pick_word(arr_wr_data, word_idx);
          events.miss  = 1'b1;
          state_d      = ST_IDLE;
        end
      end

      ST_SW_RD: begin
        arr_rd_en  = 1'b1;
        arr_rd_set = sw_set_q;
        state_d    = ST_SW_CHK;
      end

      ST_SW_CHK: begin
        if (sw_pend != '0) begin
          wbq_push_addr = arr_tag[sw_way];
          wbq_push_data = arr_data[sw_way];
          if (wbq_push_ready) begin
            wbq_push        = 1'b1;
            events.sweep_wb = 1'b1;
          end else begin
            events.wbq_stall = 1'b1;
          end
        end else begin
          arr_inv_en   = 1'b1;
          arr_inv_set  = sw_set_q;
          arr_inv_mask = old_vec;
          if (sw_set_q == '1) begin
            state_d = ST_SW_ADV;
          end else begin
            arr_rd_en  = 1'b1;
            arr_rd_set = sw_set_q + 1'b1;
          end
        end
      end

      ST_SW_ADV: begin
        ht_advance         = 1'b1;
        events.rekey       = 1'b1;
        events.rekey_count = cnt_pend_q;
        events.rekey_ext   = ext_pend_q;
        events.rekey_cycle = cyc_pend_q;
        events.rekey_pid   = pid_pend_q;
        state_d            = ST_IDLE;
      end

      default: state_d = ST_IDLE;
    endcase
  end

  // Memory port: queued write-backs first, then the line read.
  assign mem_req_valid = wbq_head_valid || ctrl_rd_valid;
  assign mem_req_we    = wbq_head_valid;
  assign mem_req_addr  = wbq_head_valid ? wbq_head_addr : line_addr;
  assign mem_req_wdata = wbq_head_data;
  assign wbq_pop       = wbq_head_valid && mem_req_ready;
  assign mem_rd_fire   = !wbq_head_valid && ctrl_rd_valid && mem_req_ready;

  assign generation = c_glob;

  // ------------------------------------------------------------------
  // Cycle-count trigger: a free-running counter, independent of traffic
  // ------------------------------------------------------------------
  assign cyc_tick = (REFRESH_CYCLES != 0) && (int'(cyc_q) == REFRESH_CYCLES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q      <= '0;
      cyc_pend_q <= 1'b0;
    end else if (REFRESH_CYCLES != 0) begin
      cyc_q <= cyc_tick ? '0 : cyc_q + 1'b1;
      if (state_q == ST_SW_ADV) cyc_pend_q <= cyc_tick;
      else if (cyc_tick)        cyc_pend_q <= 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Sequential state
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      acc_q      <= '0;
      cnt_pend_q <= 1'b0;
      ext_pend_q <= 1'b0;
      pid_pend_q <= 1'b0;
      rk_pid_q   <= '0;
      sw_set_q   <= '0;
      sw_done_q  <= '0;
      iss_k_q    <= '0;
      cmp_v_q    <= 1'b0;
      cmp_k_q    <= '0;
      cmp_ok_q   <= 1'b0;
      cmp_set_q  <= '0;
      cmp_gen_q  <= '0;
    end else begin
      state_q <= state_d;

      if (rekey_req) ext_pend_q <= 1'b1;

      unique case (state_q)
        ST_IDLE: begin
          if (rekey_now) begin
            rk_pid_q   <= pid_change ? req_pid : cur_pid;
            pid_pend_q <= pid_change;
            sw_set_q   <= '0;
            sw_done_q  <= '0;
          end else if (req_valid) begin
            if (int'(acc_q) == REFRESH - 1) begin
              acc_q      <= '0;
              cnt_pend_q <= 1'b1;
            end else begin
              acc_q <= acc_q + 1'b1;
            end
          end
        end
        ST_COMPARE: begin
          iss_k_q <= KW'(1);
          cmp_v_q <= 1'b0;
        end
        ST_HIST: begin
          if (int'(iss_k_q) < R) begin
            iss_k_q   <= iss_k_q + 1'b1;
            cmp_v_q   <= 1'b1;
            cmp_k_q   <= iss_k_q;
            cmp_set_q <= s_hist;
            cmp_gen_q <= ht_rd_gen;
            cmp_ok_q  <= ht_rd_valid && ht_rd_pid == pid_q;
          end else begin
            cmp_v_q <= 1'b0;
          end
        end
        ST_SW_CHK: begin
          if (sw_pend != '0) begin
            if (wbq_push_ready) sw_done_q[sw_way] <= 1'b1;
          end else begin
            sw_set_q  <= sw_set_q + 1'b1;
            sw_done_q <= '0;
          end
        end
        ST_SW_ADV: begin
          cnt_pend_q <= 1'b0;
          ext_pend_q <= rekey_req;
          pid_pend_q <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == ST_IDLE && req_ready && req_valid) begin
      addr_q  <= req_addr;
      we_q    <= req_we;
      wdata_q <= req_wdata;
      be_q    <= req_be;
      pid_q   <= req_pid;
    end
    if (state_q == ST_LOOKUP) snew_q <= s_new;
    if (state_q == ST_COMPARE) begin
      vway_q   <= victim_way;
      vdirty_q <= arr_valid[victim_way] && arr_dirty[victim_way];
      vtag_q   <= arr_tag[victim_way];
      vdata_q  <= arr_data[victim_way];
    end
    if (state_q == ST_HIST && cmp_v_q && hmatch_any) begin
      fset_q   <= cmp_set_q;
      fway_q   <= hmatch_way;
      fdirty_q <= arr_dirty[hmatch_way];
      fdata_q  <= arr_data[hmatch_way];
    end
  end

  // ------------------------------------------------------------------
  // Handshake rules
  // ------------------------------------------------------------------
  // The cache keeps a memory request stable until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid)
    else $error("scramble_cache: memory request withdrawn");
  // Each accepted request gets exactly one response before the next one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   resp_valid |-> state_q inside {ST_COMPARE, ST_MOVE, ST_MEM_WAIT})
    else $error("scramble_cache: response outside a serving state");

endmodule
