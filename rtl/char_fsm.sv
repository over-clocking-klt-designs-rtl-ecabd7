// char_fsm: test controller of the multiplier characterisation circuit.
//
// A run starts on a rising edge of the external trigger (synchronised into
// the FSM clock by two flip-flops). The FSM then reads stimulus words
// 0 .. n-1 from the input-stream memory, one per cycle and without gaps, so
// that the multiplier under test sees a new operand pair on every data-path
// clock edge; and it writes the LAT-cycle-delayed products from register R
// to the output-stream memory at the same addresses. When the last product
// is written it signals done and waits for the next trigger. A trigger
// during a run is ignored.
//
// The published circuit gives the FSM's role (controls the test execution,
// started by an external trigger); the states, the sample count input and
// the fixed latency bookkeeping are this design's choices. LAT = 3 is the
// registered read of the stimulus memory, the A/B operand registers and the
// R register. The FSM clock and the data-path clock are assumed to be two
// outputs of one PLL at the same frequency and phase.
//
// Interface: n_samples is sampled at the trigger (values above DEPTH are
// clamped). stim_raddr goes to the input-stream read port; res_we/res_waddr
// to the output-stream write port. busy is high during a run, done from the
// end of a run until the next trigger.
//
// The active-low reset is asynchronous in the flip-flops and also the
// disable condition of the assertion below; lint tools flag that double use
// of rst_n, and it is intended.
module char_fsm #(
  parameter int unsigned DEPTH = 2000,
  parameter int unsigned LAT   = 3,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [CW-1:0] n_samples,
  output logic [AW-1:0] stim_raddr,
  output logic          res_we,
  output logic [AW-1:0] res_waddr,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN, S_DONE} state_t;

  state_t          state_q;
  logic [2:0]      trig_sync_q;
  logic            trig_rise;
  logic [CW-1:0]   n_q;
  logic [AW-1:0]   rd_addr_q;
  logic            issue_q;
  logic [LAT-1:0]  pipe_q;
  logic [CW-1:0]   wr_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_sync_q <= '0;
    else        trig_sync_q <= {trig_sync_q[1:0], trigger};
  end
  assign trig_rise = trig_sync_q[1] && !trig_sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      n_q       <= '0;
      rd_addr_q <= '0;
      issue_q   <= 1'b0;
      pipe_q    <= '0;
      wr_cnt_q  <= '0;
    end else begin
      pipe_q <= {pipe_q[LAT-2:0], issue_q};
      if (pipe_q[LAT-1]) wr_cnt_q <= wr_cnt_q + 1'b1;

      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (trig_rise) begin
            n_q       <= (32'(n_samples) > DEPTH) ? CW'(DEPTH) : n_samples;
            rd_addr_q <= '0;
            wr_cnt_q  <= '0;
            issue_q   <= (n_samples != '0);
            state_q   <= (n_samples != '0) ? S_ISSUE : S_DONE;
          end
        end
        S_ISSUE: begin
          if (32'(rd_addr_q) + 1 >= 32'(n_q)) begin
            issue_q <= 1'b0;
            state_q <= S_DRAIN;
          end else begin
            rd_addr_q <= rd_addr_q + 1'b1;
          end
        end
        S_DRAIN: begin
          if (wr_cnt_q == n_q) state_q <= S_DONE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    stim_raddr = rd_addr_q;
    res_we     = pipe_q[LAT-1];
    res_waddr  = AW'(wr_cnt_q);
    busy       = (state_q == S_ISSUE) || (state_q == S_DRAIN);
    done       = (state_q == S_DONE);
  end

  // every result lands inside the requested range
  a_res_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    res_we |-> (32'(res_waddr) < 32'(n_q)));
endmodule
