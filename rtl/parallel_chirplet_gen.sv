// Parallel (time-interleaved) chirplet generator: NUM_GEN samples per clock.
//
// NUM_GEN identical pipelined generators each produce an undersampled copy of
// the same chirplet: generator k computes samples k, k+NUM_GEN, k+2*NUM_GEN, ...
// Side by side on the output bus, one group of NUM_GEN consecutive samples
// leaves per clock, so a 512-sample chirplet with 8 generators takes 64 output
// cycles after the 14-cycle pipeline latency, 78 cycles in all.
//
// A shared sequencer latches the parameter set on the valid input pulse
// (start), then issues one group index per clock to all generators together,
// with a per-lane flag saying whether the sample index is below num_samples
// (only the last group can be partly filled) and a last flag. The sequencer
// output register is the first of the 14 latency cycles. busy is high from the
// cycle after start until the last group has left the pipeline; a start while
// busy is ignored, because the latched parameters must stay stable for the
// samples in flight. out_group counts the groups delivered (sample index of
// lane k is out_group*NUM_GEN + k).
//
// Follows the design: eight parallel undersampled generators whose delayed
// outputs reconstruct the chirplet, 65536-entry tables, 14 cycles from valid
// input pulse to first output and one group per cycle. This implementation's
// choices: the sequencer, the busy rule, the run-time sample count and the
// lane-valid flags for a partly filled last group.
module parallel_chirplet_gen
  import chirplet_pkg::*;
#(
  parameter int unsigned NUM_GEN    = 8,
  parameter int unsigned LUT_ADDR_W = 16,
  parameter int unsigned NS_W       = 16,
  parameter int unsigned GROUP_W    = NS_W - $clog2(NUM_GEN) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  chirplet_params_t         params,
  input  logic [NS_W-1:0]          num_samples,
  output logic                     busy,
  output logic                     out_valid,
  output logic [NUM_GEN-1:0]       out_lane_valid,
  output logic [GROUP_W-1:0]       out_group,
  output cplx16_t                  out_samples [NUM_GEN],
  output logic                     out_last
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} seq_state_e;

  seq_state_e          state;
  chirplet_params_t    params_q;
  logic [NS_W-1:0]     n_q;
  logic [GROUP_W-1:0]  grp_q, last_grp;
  logic                vld_q, last_q;
  logic [NUM_GEN-1:0]  lane_ok_q;

  function automatic logic [NUM_GEN-1:0] lanes_ok(input logic [GROUP_W-1:0] g,
                                                  input logic [NS_W-1:0] n);
    logic [NUM_GEN-1:0] ok;
    for (int k = 0; k < int'(NUM_GEN); k++)
      ok[k] = (32'(g) * 32'(NUM_GEN) + 32'(k)) < 32'(n);
    return ok;
  endfunction

  function automatic logic [GROUP_W-1:0] last_group(input logic [NS_W-1:0] n);
    return GROUP_W'((32'(n) + 32'(NUM_GEN) - 32'd1) / 32'(NUM_GEN) - 32'd1);
  endfunction

  assign last_grp = last_group(n_q);

  logic gen_last_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      vld_q     <= 1'b0;
      last_q    <= 1'b0;
      grp_q     <= '0;
      lane_ok_q <= '0;
      n_q       <= '0;
      params_q  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start && num_samples != '0) begin
          params_q  <= params;
          n_q       <= num_samples;
          grp_q     <= '0;
          vld_q     <= 1'b1;
          lane_ok_q <= lanes_ok('0, num_samples);
          last_q    <= (last_group(num_samples) == '0);
          state     <= S_RUN;
        end
        S_RUN: begin
          if (last_q) begin
            vld_q  <= 1'b0;
            last_q <= 1'b0;
            state  <= S_DRAIN;
          end else begin
            grp_q     <= grp_q + 1'b1;
            lane_ok_q <= lanes_ok(grp_q + 1'b1, n_q);
            last_q    <= (grp_q + 1'b1 == last_grp);
          end
        end
        S_DRAIN: if (out_valid && gen_last_out) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- the generators
  logic [NUM_GEN-1:0] g_valid, g_last;

  for (genvar k = 0; k < int'(NUM_GEN); k++) begin : g_gen
    chirplet_generator #(
      .LANE(k), .NUM_GEN(NUM_GEN), .GROUP_W(GROUP_W), .LUT_ADDR_W(LUT_ADDR_W)
    ) u_gen (
      .clk, .rst_n,
      .params     (params_q),
      .in_valid   (vld_q),
      .in_group   (grp_q),
      .in_lane_ok (lane_ok_q[k]),
      .in_last    (last_q),
      .out_valid  (g_valid[k]),
      .out_lane_ok(out_lane_valid[k]),
      .out_last   (g_last[k]),
      .out_sample (out_samples[k])
    );
  end

  assign out_valid    = g_valid[0];
  assign gen_last_out = |g_last;
  assign out_last     = gen_last_out && out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n)                    out_group <= '0;
    else if (start && !busy)       out_group <= '0;
    else if (out_valid)            out_group <= out_group + 1'b1;
  end

  // All generators run in lock step.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (g_valid == {NUM_GEN{g_valid[0]}})
        else $error("parallel generators out of step");
    end
  end

endmodule
