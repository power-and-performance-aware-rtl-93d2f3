// recac_l2_cache: the shared L2 cache of the ReCaC design: a set-associative,
// write-back cache extended with the embedded monitoring logic (IRL and
// R-table), per-line drowsy bits and way-partitioned replacement.
//
// Access pipeline (Figure 3(b)):
//   accept   the request (core, line address, read or full-line write) is
//            taken when req_ready is high;
//   remap    the IRL rewrites the low index bits and produces the R bit; its
//            result is registered, the one extra cycle the eATD costs;
//   lookup   tags, valid bits, LRU positions and the R-table row of the set
//            are read together. A way hits when it is valid, its tag matches
//            and, in a remapped set, its R bit equals the access's R bit.
//            An access to a core's own monitoring set sends a profiling event
//            (hit and LRU stack position, or miss) to the stack distance
//            histogram.
//   hit      the line moves to MRU; a drowsy line is woken, which adds
//            WAKE_LAT cycles; the response leaves HIT_LAT cycles after accept
//            (HIT_LAT + WAKE_LAT after a wake-up).
//   miss     a victim is chosen under the core quotas (recac_victim_sel); a
//            dirty victim is written back first, then a read miss fetches the
//            line from memory (a full-line write installs without fetching).
//            The filled line is awake, MRU, owned by the missing core, and in a
//            remapped set its R bit is written to the R-table.
// Parallel eATD (PARALLEL = 1, for threads that share data): an access to a
// monitoring set is not remapped. The p-IRL (recac_pirl) queues two lookups:
// entry0 in the monitoring set with R = 0, then, only if that missed, entry1
// in the group's remapped set with R = 1, so an entry1 hit costs 2 x HIT_LAT.
// Any core may hit in either set; a foreign core's hit in the monitoring set
// does not change its LRU order, and only the owner fills a miss into the
// monitoring set (after both lookups), every other core into the remapped
// set. Only the owner's entry0 lookups are profiled. The default is the plain
// eATD, which assumes cores never share physical lines.
// The text checks the R bit of the single way the tag compare selects
// (MUX_R-table, AND1, AND2 in Figure 3(b)); here every way is qualified by
// its own R bit before the hit is formed, so a line stored both directly and
// through the remapping cannot be confused.
//
// Drowsy mode: drowsy_all (the interval boundary) puts every line into the
// low-power mode; a line is woken when it hits or is filled and then stays
// awake for the rest of the interval. The drowsy bit is the control of the
// per-line voltage controller, which is outside this logic. awake_lines
// counts lines woken since the last boundary.
//
// Flush: after reset and on flush_req, the cache walks its sets, writes back
// dirty lines (finding the original address of remapped lines through the
// R-table) and invalidates everything; the OS does this when it reprograms the
// remapping. Reset only clears the controller; the walk initialises the
// arrays (valid bits, drowsy bits, LRU order).
//
// Memory port: mem_req_* is a valid/ready request of a whole line, write or
// read; a read is answered by one mem_resp_valid pulse with the line. The
// memory latency (250 cycles in the evaluated system) is the memory's.
// Line width, interface handshakes, write-back and write-allocate, and the
// flush walk are this design's choices.
module recac_l2_cache
  import recac_pkg::*;
#(
  parameter int unsigned N      = N_CORES,
  parameter int unsigned A      = WAYS,
  parameter int unsigned NSETS  = SETS,
  parameter int unsigned AW     = ADDR_W,
  parameter int unsigned OW     = OFF_W,
  parameter int unsigned LW     = LINE_W,
  parameter int unsigned K      = PAT_W,
  parameter int unsigned HITLAT = HIT_LAT,
  parameter int unsigned WAKLAT = WAKE_LAT,
  parameter bit          PARALLEL = 1'b0      // 1: parallel eATD (shared data)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [$clog2(N)-1:0]  req_core,
  input  logic [AW-1:0]         req_addr,
  input  logic                  req_we,
  input  logic [LW-1:0]         req_wdata,
  output logic                  resp_valid,
  output logic [$clog2(N)-1:0]  resp_core,
  output logic                  resp_hit,
  output logic [LW-1:0]         resp_rdata,
  // memory side
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [AW-1:0]         mem_req_addr,
  output logic [LW-1:0]         mem_req_wdata,
  input  logic                  mem_resp_valid,
  input  logic [LW-1:0]         mem_resp_rdata,
  // OS registers
  input  logic [K-1:0]          mask,
  input  logic [K-1:0]          cur  [N],
  input  logic [K-1:0]          newp [N][N],
  input  logic                  rreg [N][N],
  input  logic                  flush_req,
  output logic                  flush_busy,
  // partitioning and power control
  input  logic [$clog2(A):0]    quota [N],
  input  logic                  drowsy_all,
  // profiling events to the SDH
  output logic                  prof_valid,
  output logic [$clog2(N)-1:0]  prof_core,
  output logic                  prof_hit,
  output logic [$clog2(A)-1:0]  prof_pos,
  // event pulses and status
  output logic                  evt_remap,      // an access was remapped
  output logic                  evt_wake,       // a drowsy line was woken
  output logic                  evt_wb,         // a dirty line was written back
  output logic [$clog2(NSETS*A):0] awake_lines
);
  localparam int unsigned IW = $clog2(NSETS);
  localparam int unsigned TW = AW - IW - OW;
  localparam int unsigned WW = $clog2(A);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned UW = IW - K;
  localparam int unsigned LCW = 16;

  // ---------------------------------------------------------------- arrays
  logic [TW-1:0] tag_arr   [NSETS][A];
  logic [CW-1:0] owner_arr [NSETS][A];
  logic [WW-1:0] lru_arr   [NSETS][A];
  logic [A-1:0]  valid_arr [NSETS];
  logic [A-1:0]  dirty_arr [NSETS];
  logic [A-1:0]  drowsy_arr[NSETS];
  logic [LW-1:0] data_arr  [NSETS][A];

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_REMAP, S_LOOKUP, S_WAIT, S_WB, S_FILL, S_FILL_WAIT,
    S_INSTALL, S_RESP, S_FLUSH, S_FLUSH_WB
  } state_e;
  state_e state;

  // latched request
  logic [CW-1:0]  r_core;
  logic [AW-1:0]  r_addr;
  logic           r_we;
  logic [LW-1:0]  r_wdata;
  logic [TW-1:0]  r_tag;
  // after remapping
  logic [IW-1:0]  s_idx;
  logic           s_r;
  set_kind_e      s_kind;
  logic [CW-1:0]  s_rslot;
  // miss handling
  logic [WW-1:0]  v_way;
  logic           r_hit;
  logic [LW-1:0]  r_rdata;
  logic [LW-1:0]  fill_data;
  logic [LCW-1:0] lat_cnt, lat_target;
  // flush walk
  logic [IW-1:0]  f_set;
  logic           flush_pend;

  // ---------------------------------------------------------------- IRL
  logic [IW-1:0]  irl_idx;
  logic           irl_r;
  set_kind_e      irl_kind;
  logic [CW-1:0]  irl_mslot, irl_rslot;

  recac_irl #(.N(N), .IW(IW), .K(K)) u_irl (
    .idx(r_addr[OW +: IW]), .thread(r_core), .mask, .cur, .newp, .rreg,
    .mod_idx(irl_idx), .remapped(irl_r), .kind(irl_kind),
    .mon_slot(irl_mslot), .rmp_slot(irl_rslot)
  );

  // parallel IRL: a monitoring-set access is searched in two sets
  logic           pi_two, pi_owner;
  logic [CW-1:0]  pi_group;
  logic [IW-1:0]  pi_idx1;
  logic           p_two, p_owner, p_second, p_retry;
  logic [IW-1:0]  p_idx1;

  recac_pirl #(.N(N), .IW(IW), .K(K)) u_pirl (
    .idx(r_addr[OW +: IW]), .thread(r_core), .mask, .cur, .newp, .rreg,
    .two_entries(pi_two), .owner(pi_owner), .group(pi_group), .entry1_idx(pi_idx1)
  );

  // classification of the set being flushed
  set_kind_e      f_kind;
  logic [CW-1:0]  f_mslot, f_rslot;
  recac_set_class #(.N(N), .K(K)) u_fclass (
    .low(f_set[K-1:0]), .mask, .cur, .newp, .rreg,
    .kind(f_kind), .mon_slot(f_mslot), .rmp_slot(f_rslot)
  );

  // ---------------------------------------------------------------- R-table
  logic [IW-1:0]  row_idx;
  logic [CW-1:0]  row_rslot;
  logic [A-1:0]   rt_row;
  logic           rt_we;

  assign row_idx   = (state == S_FLUSH || state == S_FLUSH_WB) ? f_set : s_idx;
  assign row_rslot = (state == S_FLUSH || state == S_FLUSH_WB) ? f_rslot : s_rslot;
  assign rt_we     = (state == S_INSTALL) && (s_kind == SET_RMP);

  recac_rtable #(.N(N), .A(A), .UW(UW)) u_rtable (
    .clk,
    .rd_slot(row_rslot), .rd_upper(row_idx[IW-1:K]), .rd_row(rt_row),
    .wr_en(rt_we), .wr_slot(s_rslot), .wr_upper(s_idx[IW-1:K]),
    .wr_way(v_way), .wr_bit(s_r)
  );

  // ---------------------------------------------------------------- lookup
  logic [A-1:0]   row_valid, row_dirty, row_drowsy, hitv;
  logic [TW-1:0]  row_tag   [A];
  logic [CW-1:0]  row_owner [A];
  logic [WW-1:0]  row_lru   [A];
  logic           any_hit;
  logic [WW-1:0]  hit_way, vsel_way;
  logic           rt_in_use;

  always_comb begin
    row_valid  = valid_arr[row_idx];
    row_dirty  = dirty_arr[row_idx];
    row_drowsy = drowsy_arr[row_idx];
    row_tag    = tag_arr[row_idx];
    row_owner  = owner_arr[row_idx];
    row_lru    = lru_arr[row_idx];
    rt_in_use  = (state == S_FLUSH || state == S_FLUSH_WB) ? (f_kind == SET_RMP)
                                                             : (s_kind == SET_RMP);
    any_hit = 1'b0;
    hit_way = '0;
    for (int w = A-1; w >= 0; w--) begin
      hitv[w] = row_valid[w] && (row_tag[w] == r_tag) &&
                (!rt_in_use || (rt_row[w] == s_r));
      if (hitv[w]) begin any_hit = 1'b1; hit_way = WW'(w); end
    end
  end

  recac_victim_sel #(.N(N), .A(A)) u_victim (
    .valid(row_valid), .owner(row_owner), .lru(row_lru), .core(r_core),
    .quota, .mon_set(s_kind == SET_MON), .victim(vsel_way)
  );

  // original line address of way w of the current row (undoes remapping)
  function automatic logic [AW-1:0] line_addr(input logic [WW-1:0] w);
    logic [IW-1:0] idx;
    idx = row_idx;
    if (rt_in_use && rt_row[w])
      idx = {row_idx[IW-1:K], (row_idx[K-1:0] & ~mask) | (cur[row_rslot] & mask)};
    return {row_tag[w], idx, {OW{1'b0}}};
  endfunction

  // first dirty valid way of the row being flushed
  logic          f_dirty;
  logic [WW-1:0] f_way;
  always_comb begin
    f_dirty = 1'b0;
    f_way   = '0;
    for (int w = A-1; w >= 0; w--)
      if (row_valid[w] && row_dirty[w]) begin f_dirty = 1'b1; f_way = WW'(w); end
  end

  // ---------------------------------------------------------------- control
  logic          do_touch;     // move way touch_way to MRU this cycle
  logic [WW-1:0] touch_way;

  assign req_ready  = (state == S_IDLE) && !flush_pend && !flush_req;
  assign flush_busy = (state == S_INIT) || (state == S_FLUSH) ||
                      (state == S_FLUSH_WB) || flush_pend;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    unique case (state)
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = line_addr(v_way);
        mem_req_wdata = data_arr[s_idx][v_way];
      end
      S_FILL: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = {r_addr[AW-1:OW], {OW{1'b0}}};
      end
      S_FLUSH_WB: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = line_addr(f_way);
        mem_req_wdata = data_arr[f_set][f_way];
      end
      default: ;
    endcase
  end

  // a foreign core hitting in a monitoring set leaves its LRU order alone
  assign do_touch  = (state == S_LOOKUP && any_hit && !p_retry &&
                      !(p_two && !p_second && !p_owner)) || (state == S_INSTALL);
  assign touch_way = (state == S_INSTALL) ? v_way : hit_way;

  // profiling: only the owner of a monitoring set ever reaches it
  assign prof_valid = (state == S_LOOKUP) && (s_kind == SET_MON) && !p_retry &&
                      (!p_two || p_owner);
  assign prof_core  = r_core;
  assign prof_hit   = any_hit;
  assign prof_pos   = row_lru[hit_way];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      f_set       <= '0;
      flush_pend  <= 1'b0;
      r_core      <= '0;
      r_addr      <= '0;
      r_we        <= 1'b0;
      r_wdata     <= '0;
      r_tag       <= '0;
      s_idx       <= '0;
      s_r         <= 1'b0;
      s_kind      <= SET_NORMAL;
      s_rslot     <= '0;
      v_way       <= '0;
      p_two       <= 1'b0;
      p_owner     <= 1'b0;
      p_second    <= 1'b0;
      p_retry     <= 1'b0;
      p_idx1      <= '0;
      r_hit       <= 1'b0;
      r_rdata     <= '0;
      fill_data   <= '0;
      lat_cnt     <= '0;
      lat_target  <= '0;
      resp_valid  <= 1'b0;
      resp_core   <= '0;
      resp_hit    <= 1'b0;
      resp_rdata  <= '0;
      evt_remap   <= 1'b0;
      evt_wake    <= 1'b0;
      evt_wb      <= 1'b0;
      awake_lines <= '0;
    end else begin
      resp_valid <= 1'b0;
      evt_remap  <= 1'b0;
      evt_wake   <= 1'b0;
      evt_wb     <= 1'b0;
      if (flush_req) flush_pend <= 1'b1;
      if (lat_cnt != '1) lat_cnt <= lat_cnt + 1'b1;

      unique case (state)
        S_INIT, S_FLUSH: begin
          if (state == S_FLUSH && f_dirty) begin
            state <= S_FLUSH_WB;
          end else begin
            if (f_set == IW'(NSETS - 1)) begin
              f_set <= '0;
              state <= S_IDLE;
            end else begin
              f_set <= f_set + 1'b1;
            end
          end
        end
        S_FLUSH_WB: if (mem_req_ready) begin
          evt_wb <= 1'b1;
          state  <= S_FLUSH;
        end
        S_IDLE: begin
          if (flush_pend) begin
            flush_pend <= 1'b0;
            f_set      <= '0;
            state      <= S_FLUSH;
          end else if (req_valid && req_ready) begin
            r_core  <= req_core;
            r_addr  <= req_addr;
            r_we    <= req_we;
            r_wdata <= req_wdata;
            r_tag   <= req_addr[AW-1 -: TW];
            lat_cnt <= LCW'(1);
            state   <= S_REMAP;
          end
        end
        S_REMAP: begin
          p_second <= 1'b0;
          p_retry  <= 1'b0;
          if (PARALLEL && pi_two) begin
            // entry0: the monitoring set itself, R = 0
            s_idx   <= r_addr[OW +: IW];
            s_r     <= 1'b0;
            s_kind  <= SET_MON;
            s_rslot <= pi_group;
            p_two   <= 1'b1;
            p_owner <= pi_owner;
            p_idx1  <= pi_idx1;
          end else begin
            s_idx     <= irl_idx;
            s_r       <= irl_r;
            s_kind    <= irl_kind;
            s_rslot   <= irl_rslot;
            evt_remap <= irl_r;
            p_two     <= 1'b0;
            p_owner   <= 1'b0;
          end
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin
          r_hit <= any_hit;
          if (any_hit && !p_retry) begin
            r_rdata    <= data_arr[s_idx][hit_way];
            lat_target <= LCW'(p_second ? 2 * HITLAT : HITLAT) +
                          (row_drowsy[hit_way] ? LCW'(WAKLAT) : '0);
            state      <= S_WAIT;
          end else if (p_two && !p_second && !p_retry) begin
            // entry0 missed: serve entry1, the remapped set with R = 1
            s_idx     <= p_idx1;
            s_r       <= 1'b1;
            s_kind    <= SET_RMP;
            p_second  <= 1'b1;
            evt_remap <= 1'b1;
          end else if (p_two && p_second && p_owner && !p_retry) begin
            // both missed: the owner fills its monitoring set
            s_idx   <= r_addr[OW +: IW];
            s_r     <= 1'b0;
            s_kind  <= SET_MON;
            p_retry <= 1'b1;
          end else begin
            v_way <= vsel_way;
            if (row_valid[vsel_way] && row_dirty[vsel_way]) state <= S_WB;
            else if (r_we)                                     state <= S_INSTALL;
            else                                               state <= S_FILL;
          end
        end
        S_WAIT: if (lat_cnt >= lat_target - LCW'(2)) state <= S_RESP;
        S_WB: if (mem_req_ready) begin
          evt_wb <= 1'b1;
          state  <= r_we ? S_INSTALL : S_FILL;
        end
        S_FILL: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp_valid) begin
          fill_data <= mem_resp_rdata;
          state     <= S_INSTALL;
        end
        S_INSTALL: begin
          r_rdata <= r_we ? r_wdata : fill_data;
          state   <= S_RESP;
        end
        S_RESP: begin
          resp_valid <= 1'b1;
          resp_core  <= r_core;
          resp_hit   <= r_hit;
          resp_rdata <= r_rdata;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      // wake-up bookkeeping
      if ((state == S_LOOKUP && any_hit && row_drowsy[hit_way]) ||
          (state == S_INSTALL && row_drowsy[v_way])) begin
        evt_wake    <= 1'b1;
        awake_lines <= awake_lines + 1'b1;
      end
      if (drowsy_all) awake_lines <= '0;
    end
  end

  // array updates (no reset: the initial walk clears them)
  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      valid_arr[f_set]  <= '0;
      dirty_arr[f_set]  <= '0;
      drowsy_arr[f_set] <= '1;
      for (int w = 0; w < A; w++) lru_arr[f_set][w] <= WW'(w);
    end
    if (state == S_FLUSH && !f_dirty) valid_arr[f_set] <= '0;
    if (state == S_FLUSH_WB && mem_req_ready) dirty_arr[f_set][f_way] <= 1'b0;

    if (do_touch) begin
      for (int w = 0; w < A; w++)
        if (row_lru[w] < row_lru[touch_way]) lru_arr[s_idx][w] <= row_lru[w] + 1'b1;
      lru_arr[s_idx][touch_way] <= '0;
    end
    if (state == S_LOOKUP && any_hit) begin
      drowsy_arr[s_idx][hit_way] <= 1'b0;
      if (r_we) begin
        data_arr[s_idx][hit_way]  <= r_wdata;
        dirty_arr[s_idx][hit_way] <= 1'b1;
      end
    end
    if (state == S_WB && mem_req_ready) dirty_arr[s_idx][v_way] <= 1'b0;
    if (state == S_INSTALL) begin
      tag_arr[s_idx][v_way]    <= r_tag;
      owner_arr[s_idx][v_way]  <= r_core;
      valid_arr[s_idx][v_way]  <= 1'b1;
      dirty_arr[s_idx][v_way]  <= r_we;
      drowsy_arr[s_idx][v_way] <= 1'b0;
      data_arr[s_idx][v_way]   <= r_we ? r_wdata : fill_data;
    end
    if (drowsy_all)
      for (int s = 0; s < NSETS; s++) drowsy_arr[s] <= '1;
  end
endmodule
