// majority_vote: batch-level branch outcome for the RPU branch predictor.
//
// The RPU predicts once per batch, so the predictor must be trained with a
// single outcome even when the threads of a batch resolve a branch
// differently. This unit takes the resolved direction and target of every
// thread, counts taken against not-taken among the active threads (a 32-way
// comparison) and, for taken branches, finds the most selected target address
// (each taken thread counts how many taken threads share its target; the
// largest count wins, ties go to the lowest thread). The majority outcome
// optimises the history for the most common control flow; threads outside
// agree_mask are the ones that will be flushed and re-steered at commit.
//
// Timing: one result per cycle, registered (one cycle from in_valid to
// out_valid), which is part of the longer branch latency of the RPU.
// A tie between taken and not-taken resolves to not-taken, and no active
// thread gives out_valid with agree_mask zero: both are this design's choices.
module majority_vote #(
  parameter int unsigned BATCH = 32,
  parameter int unsigned PC_W  = 48
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [BATCH-1:0]           active,
  input  logic [BATCH-1:0]           taken,
  input  logic [BATCH-1:0][PC_W-1:0] target,
  output logic                       out_valid,
  output logic                       maj_taken,
  output logic [PC_W-1:0]            maj_target,
  output logic [BATCH-1:0]           agree_mask,
  output logic [$clog2(BATCH+1)-1:0] taken_cnt,
  output logic [$clog2(BATCH+1)-1:0] active_cnt
);

  localparam int unsigned CW = $clog2(BATCH + 1);

  logic [BATCH-1:0]         tk;
  logic [CW-1:0]            n_tk, n_act, best_cnt;
  logic [BATCH-1:0][CW-1:0] same_cnt;
  logic [PC_W-1:0]          best_tgt;
  logic                     dir;
  logic [BATCH-1:0]         agree;

  always_comb begin
    tk    = active & taken;
    n_tk  = '0;
    n_act = '0;
    for (int i = 0; i < BATCH; i++) begin
      n_tk  = n_tk + CW'(tk[i]);
      n_act = n_act + CW'(active[i]);
    end
    dir = ({1'b0, n_tk} << 1) > {1'b0, n_act};

    // target popularity among the taken threads
    for (int i = 0; i < BATCH; i++) begin
      same_cnt[i] = '0;
      for (int j = 0; j < BATCH; j++)
        same_cnt[i] = same_cnt[i] + CW'(tk[i] && tk[j] && target[i] == target[j]);
    end
    best_cnt = '0;
    best_tgt = '0;
    for (int i = 0; i < BATCH; i++)
      if (same_cnt[i] > best_cnt) begin
        best_cnt = same_cnt[i];
        best_tgt = target[i];
      end

    for (int i = 0; i < BATCH; i++)
      agree[i] = dir ? (tk[i] && target[i] == best_tgt)
                     : (active[i] && !taken[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      maj_taken  <= 1'b0;
      maj_target <= '0;
      agree_mask <= '0;
      taken_cnt  <= '0;
      active_cnt <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        maj_taken  <= dir;
        maj_target <= dir ? best_tgt : '0;
        agree_mask <= agree;
        taken_cnt  <= n_tk;
        active_cnt <= n_act;
      end
    end
  end

endmodule
