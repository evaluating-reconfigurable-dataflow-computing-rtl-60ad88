// stream_ctrl: sequencing of activations, sweeps and streams for the engine.
//
// The engine supports the three ways of streaming p through the kernel:
//   MODE_PCIE  every sweep's input comes from the host stream and its output
//              goes back to the host; the host swaps input and output and
//              streams again (n_iter sweeps, each with its own flush);
//   MODE_NNITR the host streams the initial p once; the output of sweeps
//              1..n_iter-1 goes into the internal buffer (one p array deep) and
//              is the next sweep's input, back to back with no flush; only
//              the last sweep's output goes to the host;
//   MODE_DRAM  the host stream is first written to on-board DRAM (LOAD); each
//              sweep reads p from DRAM and writes the result to the same
//              addresses, and waits for the last write before the next sweep
//              starts; at the end the array is read back to the host (UNLOAD).
// Flow control: the kernel has one enable. It advances when its source has a
// vector (or it is flushing) and, if a result vector is waiting at its output,
// the sink for that result can take it. A flush feeds invalid vectors until all
// results of the sweeps fed so far have come out.
// Sweep counters for input and output are kept apart, since in MODE_NNITR the
// kernel holds the tail of one sweep and the head of the next at once.
// The data outputs are multiplexed or passed through from the kernel and the
// sources; this module decides only the handshakes.
// The three scenarios follow the document; the state machine, the handshakes and
// the run-time mode select are choices of this design.
module stream_ctrl
  import himeno_pkg::*;
#(
  parameter int P  = 48,
  parameter int NV = 11355,
  parameter int IW = 16,
  localparam int VW = P * 32,
  localparam int CW = $clog2(NV + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  mode_e         mode,
  input  logic [IW-1:0] n_iter,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] sweeps_done,
  output mode_e         cur_mode,
  // host input stream (from PCIe)
  input  logic          hin_valid,
  output logic          hin_ready,
  input  logic [VW-1:0] hin_data,
  // host output stream (to PCIe)
  output logic          hout_valid,
  input  logic          hout_ready,
  output logic [VW-1:0] hout_data,
  // internal buffer: push side and pop side
  output logic          lp_push_valid,
  input  logic          lp_push_ready,
  output logic [VW-1:0] lp_push_data,
  input  logic          lp_pop_valid,
  output logic          lp_pop_ready,
  input  logic [VW-1:0] lp_pop_data,
  output logic          lp_clear,
  // kernel
  output logic          k_en,
  output logic          k_in_valid,
  output logic [VW-1:0] k_in_vec,
  input  logic          k_out_valid,
  input  logic [VW-1:0] k_out_vec,
  // DRAM streams; addresses come from two dram_addr_gen instances
  output logic          rd_start,
  output logic          wr_start,
  input  logic          rd_valid,
  output logic          rd_ready,
  input  logic [VW-1:0] rd_data,
  output logic          wr_valid,
  input  logic          wr_ready,
  output logic [VW-1:0] wr_data,
  input  logic          wr_addr_valid,
  // observation
  output logic          flushing,
  output logic          stalled
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_FLUSH, S_UNLOAD, S_DONE} state_e;
  state_e        state;
  logic [IW-1:0] iters, in_sweep, out_sweep;
  logic [CW-1:0] in_cnt, out_cnt;

  // ------------------------------------------------ source and sink selection
  logic src_valid, src_ok, sink_host, sink_ready, out_go, in_take, run;

  always_comb begin
    unique case (cur_mode)
      MODE_NNITR: src_valid = (in_sweep == '0) ? hin_valid : lp_pop_valid;
      MODE_DRAM:  src_valid = rd_valid;
      default:    src_valid = hin_valid;
    endcase
    sink_host = (cur_mode == MODE_PCIE) ||
                (cur_mode == MODE_NNITR && out_sweep == iters - 1'b1);
    if (cur_mode == MODE_DRAM) sink_ready = wr_ready && wr_addr_valid;
    else if (sink_host)        sink_ready = hout_ready;
    else                       sink_ready = lp_push_ready;

    run      = (state == S_RUN) || (state == S_FLUSH);
    src_ok   = (state == S_FLUSH) || (state == S_RUN && src_valid);
    k_en     = run && src_ok && (!k_out_valid || sink_ready);
    out_go   = run && src_ok && k_out_valid;           // result offered to its sink
    in_take  = k_en && (state == S_RUN);
    stalled  = run && !k_en;
    flushing = (state == S_FLUSH);

    k_in_valid = (state == S_RUN);
    unique case (cur_mode)
      MODE_NNITR: k_in_vec = (in_sweep == '0) ? hin_data : lp_pop_data;
      MODE_DRAM:  k_in_vec = rd_data;
      default:    k_in_vec = hin_data;
    endcase
    if (state == S_FLUSH) k_in_vec = '0;

    // host input: kernel source, or DRAM load
    hin_ready = (state == S_LOAD) ? (wr_ready && wr_addr_valid)
              : (in_take && (cur_mode == MODE_PCIE ||
                             (cur_mode == MODE_NNITR && in_sweep == '0)));
    lp_pop_ready = in_take && cur_mode == MODE_NNITR && in_sweep != '0;
    rd_ready     = (state == S_UNLOAD) ? hout_ready : (in_take && cur_mode == MODE_DRAM);

    lp_push_valid = out_go && cur_mode == MODE_NNITR && !sink_host;
    lp_push_data  = k_out_vec;

    if (state == S_UNLOAD) begin
      hout_valid = rd_valid;
      hout_data  = rd_data;
    end else begin
      hout_valid = out_go && sink_host;
      hout_data  = k_out_vec;
    end

    if (state == S_LOAD) begin
      wr_valid = hin_valid && wr_addr_valid;
      wr_data  = hin_data;
    end else begin
      wr_valid = out_go && cur_mode == MODE_DRAM && wr_addr_valid;
      wr_data  = k_out_vec;
    end
  end

  // ------------------------------------------------ counters and states
  logic in_last, out_last, load_take, unload_take;
  assign in_last     = in_take && (in_cnt == CW'(NV - 1));
  assign out_last    = k_en && k_out_valid && (out_cnt == CW'(NV - 1));
  assign load_take   = (state == S_LOAD) && wr_valid && wr_ready;
  assign unload_take = (state == S_UNLOAD) && rd_valid && hout_ready;
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cur_mode <= MODE_PCIE; iters <= '0;
      in_sweep <= '0; out_sweep <= '0; in_cnt <= '0; out_cnt <= '0;
      rd_start <= 1'b0; wr_start <= 1'b0; done <= 1'b0; lp_clear <= 1'b0;
      sweeps_done <= '0;
    end else begin
      rd_start <= 1'b0;
      wr_start <= 1'b0;
      done     <= 1'b0;
      lp_clear <= 1'b0;

      // input side: vectors fed in RUN, or written to DRAM in LOAD
      if (in_take || load_take)
        in_cnt <= (in_cnt == CW'(NV - 1)) ? '0 : in_cnt + 1'b1;
      if (in_last) in_sweep <= in_sweep + 1'b1;
      // output side: results leaving the kernel, or vectors read back in UNLOAD
      if ((k_en && k_out_valid) || unload_take)
        out_cnt <= (out_cnt == CW'(NV - 1)) ? '0 : out_cnt + 1'b1;
      if (out_last) begin
        out_sweep   <= out_sweep + 1'b1;
        sweeps_done <= sweeps_done + 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          cur_mode    <= mode;
          iters       <= (n_iter == '0) ? IW'(1) : n_iter;
          in_sweep    <= '0;
          out_sweep   <= '0;
          in_cnt      <= '0;
          out_cnt     <= '0;
          sweeps_done <= '0;
          lp_clear    <= 1'b1;
          if (mode == MODE_DRAM) begin
            state    <= S_LOAD;
            wr_start <= 1'b1;
          end else begin
            state <= S_RUN;
          end
        end
        S_LOAD: if (load_take && in_cnt == CW'(NV - 1)) begin
          state    <= S_RUN;
          rd_start <= 1'b1;
          wr_start <= 1'b1;
        end
        S_RUN: if (in_last && !(cur_mode == MODE_NNITR && in_sweep + 1'b1 < iters))
          state <= S_FLUSH;
        S_FLUSH: if (out_sweep == in_sweep) begin
          if (out_sweep < iters) begin
            state <= S_RUN;
            if (cur_mode == MODE_DRAM) begin
              rd_start <= 1'b1;
              wr_start <= 1'b1;
            end
          end else if (cur_mode == MODE_DRAM) begin
            state    <= S_UNLOAD;
            rd_start <= 1'b1;
          end else begin
            state <= S_DONE;
          end
        end
        S_UNLOAD: if (unload_take && out_cnt == CW'(NV - 1)) state <= S_DONE;
        S_DONE: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a result is never dropped: when it is offered and the kernel moves on,
  // its sink has taken it
  property p_result_taken;
    @(posedge clk) disable iff (!rst_n) (out_go && k_en) |-> sink_ready;
  endproperty
  assert property (p_result_taken);
endmodule
