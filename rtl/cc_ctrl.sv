// cc_ctrl: compute cluster controller, added to the slice's control box.
//
// The host core talks to it only with loads and stores to the slice's
// reserved address range (word addresses, bits 23:22 pick the region):
//   region 0, control registers (bits 3:0):
//     0 WAY_MODE   2 bits per way pair (0 cache, 1 compute, 2 scratchpad);
//                  a write flushes the ways that leave the cache (flush_req
//                  until flush_ack from the cache controller), then locks them
//     1 STATUS     bit0 flushing, bit1 running, bit2 done, bit3 address error
//     2 SCHED_BASE sub-array row of folding step 0
//     3 SCHED_LEN  number of folding steps
//     4 ITERS      schedule repetitions (0: until the done check fires)
//     5 OFF_BASE, 6 OFF_STRIDE  operand address offset: tile k adds
//                  OFF_BASE + k*OFF_STRIDE (k counts compute clusters)
//     7 RUN        write 1 to start
//     8 CYCLES, 9 STALLS, 10 ITER_DONE  statistics of the last run
//   region 1, sub-array words: bits 18+..: pair, mcc, sub-array, row; bit 21
//     writes the word to that row of every compute cluster at once
//   region 2, crossbar configuration words: entry, 32-bit slice (bits 3:0)
//   region 3, switch-box configuration: box index (bits AW+4:AW, box r*4+c of
//     the grid), row (bits AW-1:0)
// Requests are accepted (host_ready) when idle; during a flush or a run only
// control-register reads are. Read data comes one cycle after acceptance.
// Array words of cache-mode way pairs are refused (writes dropped, reads 0).
//
// Running: the controller steps through the schedule, one step per cycle. It
// broadcasts the row address (SCHED_BASE + step) to all clusters (step_re)
// and reads the step's crossbar word from entry SCHED_BASE + step of the
// tag-array store (modulo its depth), so several schedules can stay
// resident in rows and store at once and a run picks one; both arrive
// together one cycle later, when the step executes (exec). A step commits in
// the cycle it executes unless its crossbar word carries a bus operation.
// Then commit is withheld (the clusters stall) while the controller serves
// the requesting clusters one at a time, lowest index first: it adds the
// tile's offset, and either accesses a scratchpad way pair (address bit 31
// clear; the rest decodes like region 1) or forwards the request to the
// cache controller (bit 31 set, ext_* handshake). Read data goes back on the
// shared response word with a per-cluster valid. When all are served the
// step commits and the next is fetched in the same cycle. After the last
// step of the schedule an iteration is counted; the run ends after ITERS
// iterations or after a step with done_chk at which every compute cluster
// shows its done bit.
// What the unit does (selection, flush, lock, configuration loading,
// scratchpad filling, offsets, run register, address broadcast, crossbar
// configuration fetch, stall until all requests are served, serialised
// bus) is the document's; the register map, encodings and the serving order
// are this design's. Synchronous active-high reset.
module cc_ctrl
  import freac_pkg::*;
#(
  parameter int unsigned NUM_PAIRS  = 10,
  parameter int unsigned SA_ROWS    = 2048,
  parameter int unsigned XCFG_DEPTH = 1024,
  localparam int unsigned NUM_MCC   = NUM_PAIRS * MCC_PER_PAIR,
  localparam int unsigned AW        = $clog2(SA_ROWS),
  localparam int unsigned XAW       = $clog2(XCFG_DEPTH),
  localparam int unsigned WSW       = $clog2(XCFG_WORDS),
  localparam int unsigned NUM_WAYS  = 2 * NUM_PAIRS
) (
  input  logic                          clk,
  input  logic                          rst,
  // host loads and stores
  input  logic                          host_req,
  input  logic                          host_we,
  input  logic [23:0]                   host_addr,
  input  logic [31:0]                   host_wdata,
  output logic                          host_ready,
  output logic                          host_rvalid,
  output logic [31:0]                   host_rdata,
  // way partitioning, to the cache controller
  output way_mode_e [NUM_PAIRS-1:0]     way_mode,
  output logic [NUM_WAYS-1:0]           lock_mask,
  output logic                          flush_req,
  output logic [NUM_WAYS-1:0]           flush_mask,
  input  logic                          flush_ack,
  // sub-array access (decoded to clusters outside)
  output logic                          acc_en,
  output logic                          acc_we,
  output logic                          acc_bcast,
  output logic [3:0]                    acc_pair,
  output logic [1:0]                    acc_mcc,
  output logic [1:0]                    acc_sa,
  output logic [AW-1:0]                 acc_row,
  output logic [31:0]                   acc_wdata,
  input  logic [31:0]                   acc_rdata,
  // crossbar configuration store (tag arrays)
  output logic                          xs_we,
  output logic [XAW-1:0]                xs_waddr,
  output logic [WSW-1:0]                xs_word,
  output logic [31:0]                   xs_wdata,
  output logic                          xs_re,
  output logic [XAW-1:0]                xs_raddr,
  input  xcfg_t                         xcfg_cur,
  // switch-box configuration
  output logic                          sw_we,
  output logic [4:0]                    sw_idx,
  output logic [AW-1:0]                 sw_addr,
  output logic [31:0]                   sw_wdata,
  // folding-step broadcast
  output logic [NUM_MCC-1:0]            cmp_mask,
  output logic                          step_re,
  output logic [AW-1:0]                 step_addr,
  output logic                          exec,
  output logic                          commit,
  // operand bus
  input  logic [NUM_MCC-1:0]            bus_req,
  input  logic [NUM_MCC-1:0]            bus_we,
  input  logic [NUM_MCC-1:0][31:0]      bus_addr,
  input  logic [NUM_MCC-1:0][31:0]      bus_wdata,
  output logic [NUM_MCC-1:0]            rsp_valid,
  output logic [31:0]                   rsp_data,
  input  logic [NUM_MCC-1:0]            done_bits,
  // operands forwarded to the cache controller
  output logic                          ext_req,
  output logic                          ext_we,
  output logic [31:0]                   ext_addr,
  output logic [31:0]                   ext_wdata,
  input  logic                          ext_gnt,
  input  logic                          ext_rvalid,
  input  logic [31:0]                   ext_rdata,
  output logic                          running
);
  typedef enum logic [2:0] {
    S_IDLE, S_FLUSH, S_FETCH, S_EXEC, S_SERVE, S_SP_RD, S_EXT_RD
  } state_e;

  state_e                      state;
  way_mode_e [NUM_PAIRS-1:0]   pend_mode;
  logic [31:0]                 sched_base, sched_len, iters, off_base, off_stride;
  logic [31:0]                 cycles, stalls, iter_done;
  logic                        done_flag, err_flag;
  logic [31:0]                 step;
  logic [NUM_MCC-1:0]          served;
  logic [$clog2(NUM_MCC)-1:0]  cur;
  logic                        rd_is_array;
  logic [31:0]                 ctrl_rdata;

  // ------------------------------------------------------------ host decode
  logic [1:0] h_rgn;
  logic       h_accept, h_idle;
  assign h_rgn      = host_addr[23:22];
  assign h_idle     = (state == S_IDLE);
  assign host_ready = h_idle || (h_rgn == RGN_CTRL && !host_we);
  assign h_accept   = host_req && host_ready;

  function automatic logic pair_is(input way_mode_e [NUM_PAIRS-1:0] m,
                                   input logic [3:0] p, input way_mode_e want);
    return (32'(p) < NUM_PAIRS) && (m[p] == want);
  endfunction

  // ------------------------------------------------------- cluster masks
  always_comb begin
    for (int p = 0; p < NUM_PAIRS; p++) begin
      lock_mask[2*p +: 2] = (way_mode[p] != WAY_CACHE) ? 2'b11 : 2'b00;
      for (int m = 0; m < MCC_PER_PAIR; m++)
        cmp_mask[p*MCC_PER_PAIR + m] = (way_mode[p] == WAY_COMPUTE);
    end
  end

  // ---------------------------------------------------- operand serving
  logic [NUM_MCC-1:0]         pend;
  logic [$clog2(NUM_MCC)-1:0] pick;
  logic [31:0]                rank, eff;
  logic                       eff_ext, eff_ok;
  assign pend = bus_req & ~served;

  always_comb begin
    pick = '0;
    for (int i = NUM_MCC - 1; i >= 0; i--)
      if (pend[i]) pick = i[$clog2(NUM_MCC)-1:0];
    rank = '0;
    for (int i = 0; i < NUM_MCC; i++)
      if (i < 32'(pick) && cmp_mask[i]) rank = rank + 1;
  end

  assign eff     = bus_addr[pick] + off_base + rank * off_stride;
  assign eff_ext = eff[31];
  assign eff_ok  = pair_is(way_mode, eff[AW+7:AW+4], WAY_SCRATCH) && (eff[30:AW+8] == '0);

  // ---------------------------------------------------- step advancement
  logic all_done, last_step, finish;
  assign all_done  = (|cmp_mask) && (&(done_bits | ~cmp_mask));
  assign last_step = (step == sched_len - 1);
  assign finish    = (xcfg_cur.done_chk && all_done) ||
                     (last_step && iters != 0 && iter_done + 1 == iters);

  logic want_commit;
  always_comb begin
    want_commit = 1'b0;
    if (state == S_EXEC)
      want_commit = !(xcfg_cur.bus_op != BUS_NONE && |bus_req);
    else if (state == S_SERVE)
      want_commit = (pend == '0);
  end

  logic [31:0] next_step;
  assign next_step = last_step ? 32'd0 : step + 1;

  always_comb begin
    exec      = (state == S_EXEC) || (state == S_SERVE) ||
                (state == S_SP_RD) || (state == S_EXT_RD);
    commit    = want_commit;
    step_re   = 1'b0;
    step_addr = AW'(sched_base);
    xs_re     = 1'b0;
    xs_raddr  = '0;
    if (state == S_FETCH) begin
      step_re   = 1'b1;
      step_addr = AW'(sched_base);
      xs_re     = 1'b1;
      xs_raddr  = XAW'(sched_base);
    end else if (want_commit && !finish) begin
      step_re   = 1'b1;
      step_addr = AW'(sched_base + next_step);
      xs_re     = 1'b1;
      xs_raddr  = XAW'(sched_base + next_step);
    end
  end

  // -------------------------------------------- array / cfg access outputs
  always_comb begin
    acc_en    = 1'b0;
    acc_we    = 1'b0;
    acc_bcast = 1'b0;
    acc_pair  = host_addr[AW+7:AW+4];
    acc_mcc   = host_addr[AW+3:AW+2];
    acc_sa    = host_addr[AW+1:AW];
    acc_row   = host_addr[AW-1:0];
    acc_wdata = host_wdata;
    ext_req   = 1'b0;
    ext_we    = bus_we[pick];
    ext_addr  = eff;
    ext_wdata = bus_wdata[pick];
    if (state == S_SERVE) begin
      acc_pair  = eff[AW+7:AW+4];
      acc_mcc   = eff[AW+3:AW+2];
      acc_sa    = eff[AW+1:AW];
      acc_row   = eff[AW-1:0];
      acc_wdata = bus_wdata[pick];
      if (pend != '0) begin
        if (eff_ext) ext_req = 1'b1;
        else if (eff_ok) begin
          acc_en = 1'b1;
          acc_we = bus_we[pick];
        end
      end
    end else if (h_idle && h_accept && h_rgn == RGN_ARRAY) begin
      acc_bcast = host_addr[21] && host_we;
      acc_en    = acc_bcast ||
                  (!pair_is(way_mode, acc_pair, WAY_CACHE) && 32'(acc_pair) < NUM_PAIRS);
      acc_we    = host_we;
    end
  end

  assign xs_we    = h_idle && h_accept && host_we && h_rgn == RGN_XCFG;
  assign xs_waddr = host_addr[XAW+3:4];
  assign xs_word  = host_addr[WSW-1:0];
  assign xs_wdata = host_wdata;
  assign sw_we    = h_idle && h_accept && host_we && h_rgn == RGN_SWCFG;
  assign sw_idx   = host_addr[AW+4:AW];
  assign sw_addr  = host_addr[AW-1:0];
  assign sw_wdata = host_wdata;

  assign flush_req = (state == S_FLUSH);
  assign running   = (state != S_IDLE) && (state != S_FLUSH);

  always_comb begin
    for (int p = 0; p < NUM_PAIRS; p++)
      flush_mask[2*p +: 2] = (way_mode[p] == WAY_CACHE && pend_mode[p] != WAY_CACHE)
                             ? 2'b11 : 2'b00;
  end

  // response to clusters
  always_comb begin
    rsp_valid = '0;
    rsp_data  = '0;
    if (state == S_SP_RD) begin
      rsp_valid[cur] = 1'b1;
      rsp_data       = acc_rdata;
    end else if (state == S_EXT_RD && ext_rvalid) begin
      rsp_valid[cur] = 1'b1;
      rsp_data       = ext_rdata;
    end else if (state == S_SERVE && pend != '0 && !eff_ext && !eff_ok && !bus_we[pick]) begin
      rsp_valid[pick] = 1'b1;     // refused read returns 0
    end
  end

  // ------------------------------------------------------ control registers
  always_comb begin
    unique case (host_addr[3:0])
      REG_WAY_MODE:   ctrl_rdata = 32'(way_mode);
      REG_STATUS:     ctrl_rdata = {28'd0, err_flag, done_flag, running, state == S_FLUSH};
      REG_SCHED_BASE: ctrl_rdata = sched_base;
      REG_SCHED_LEN:  ctrl_rdata = sched_len;
      REG_ITERS:      ctrl_rdata = iters;
      REG_OFF_BASE:   ctrl_rdata = off_base;
      REG_OFF_STRIDE: ctrl_rdata = off_stride;
      REG_CYCLES:     ctrl_rdata = cycles;
      REG_STALLS:     ctrl_rdata = stalls;
      REG_ITER_DONE:  ctrl_rdata = iter_done;
      default:        ctrl_rdata = '0;
    endcase
  end

  logic [31:0] rdata_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      host_rvalid <= 1'b0;
      rd_is_array <= 1'b0;
      rdata_q     <= '0;
    end else begin
      host_rvalid <= h_accept && !host_we;
      rd_is_array <= h_accept && !host_we && h_rgn == RGN_ARRAY && acc_en;
      rdata_q     <= (h_rgn == RGN_CTRL) ? ctrl_rdata : 32'd0;
    end
  end
  assign host_rdata = rd_is_array ? acc_rdata : rdata_q;

  // -------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      way_mode   <= '{default: WAY_CACHE};
      pend_mode  <= '{default: WAY_CACHE};
      sched_base <= '0;
      sched_len  <= 32'd1;
      iters      <= 32'd1;
      off_base   <= '0;
      off_stride <= '0;
      cycles     <= '0;
      stalls     <= '0;
      iter_done  <= '0;
      done_flag  <= 1'b0;
      err_flag   <= 1'b0;
      step       <= '0;
      served     <= '0;
      cur        <= '0;
    end else begin
      if (running) cycles <= cycles + 1;
      unique case (state)
        S_IDLE: if (h_accept && host_we && h_rgn == RGN_CTRL) begin
          unique case (host_addr[3:0])
            REG_WAY_MODE: begin
              for (int p = 0; p < NUM_PAIRS; p++)
                pend_mode[p] <= (host_wdata[2*p +: 2] == 2'd3) ? WAY_CACHE
                                : way_mode_e'(host_wdata[2*p +: 2]);
              state <= S_FLUSH;
            end
            REG_SCHED_BASE: sched_base <= host_wdata;
            REG_SCHED_LEN:  sched_len  <= host_wdata;
            REG_ITERS:      iters      <= host_wdata;
            REG_OFF_BASE:   off_base   <= host_wdata;
            REG_OFF_STRIDE: off_stride <= host_wdata;
            REG_RUN: if (host_wdata[0] && sched_len != 0) begin
              state     <= S_FETCH;
              step      <= '0;
              cycles    <= '0;
              stalls    <= '0;
              iter_done <= '0;
              done_flag <= 1'b0;
            end
            default: ;
          endcase
        end
        S_FLUSH: if (flush_mask == '0 || flush_ack) begin
          way_mode <= pend_mode;
          state    <= S_IDLE;
        end
        S_FETCH: state <= S_EXEC;
        S_EXEC, S_SERVE: begin
          if (want_commit) begin
            served <= '0;
            if (last_step) iter_done <= iter_done + 1;
            if (finish) begin
              state     <= S_IDLE;
              done_flag <= 1'b1;
            end else begin
              step  <= next_step;
              state <= S_EXEC;
            end
          end else begin
            stalls <= stalls + 1;
            state  <= S_SERVE;
            if (state == S_SERVE) begin
              cur <= pick;
              if (eff_ext) begin
                if (ext_gnt) begin
                  if (bus_we[pick]) served[pick] <= 1'b1;
                  else              state <= S_EXT_RD;
                end
              end else if (eff_ok) begin
                if (bus_we[pick]) served[pick] <= 1'b1;
                else              state <= S_SP_RD;
              end else begin
                err_flag     <= 1'b1;
                served[pick] <= 1'b1;
              end
            end
          end
        end
        S_SP_RD: begin
          stalls      <= stalls + 1;
          served[cur] <= 1'b1;
          state       <= S_SERVE;
        end
        S_EXT_RD: begin
          stalls <= stalls + 1;
          if (ext_rvalid) begin
            served[cur] <= 1'b1;
            state       <= S_SERVE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The crossbar word of every cluster is the same, so either all compute
  // clusters request the bus in a step or none does.
  a_lockstep : assert property (@(posedge clk) disable iff (rst)
    exec |-> (bus_req == '0 || (bus_req & cmp_mask) == cmp_mask));
endmodule
