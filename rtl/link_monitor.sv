// link_monitor: transition counter for the link power model
//   P ~ T(0->1) * Cs + (T1 + 2*T2) * Cc.
// Every clock it compares the link lines with their value one clock before
// and adds to the counters: 0->1 transitions of single lines, and the
// Type I..IV transitions of the W-1 adjacent line pairs (Type I one line
// switches, II both switch in opposite directions, III both in the same
// direction, IV neither). "coupling" accumulates T1 + 2*T2. The weights
// Cs, Cc, Vdd and f are left to the user. clear zeroes the counters (and
// the previous value is still sampled). Counters wrap at 2^32.
module link_monitor
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [W-1:0] link,
  output link_stats_t stats
);
  logic [W-1:0]  prev;
  logic [STAT_W-1:0] n01, n1, n2, n3, n4;

  always_comb begin
    n01 = '0; n1 = '0; n2 = '0; n3 = '0; n4 = '0;
    for (int i = 0; i < W; i++) if (!prev[i] && link[i]) n01 += 1;
    for (int i = 0; i < W-1; i++) begin
      logic s0, s1;
      s0 = prev[i] ^ link[i];
      s1 = prev[i+1] ^ link[i+1];
      if (s0 ^ s1)                n1 += 1;
      else if (!s0)               n4 += 1;
      else if (link[i] ^ link[i+1]) n2 += 1;
      else                        n3 += 1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev  <= '0;
      stats <= '0;
    end else begin
      prev <= link;
      if (clear) stats <= '0;
      else begin
        stats.t01      <= stats.t01 + n01;
        stats.t1       <= stats.t1 + n1;
        stats.t2       <= stats.t2 + n2;
        stats.t3       <= stats.t3 + n3;
        stats.t4       <= stats.t4 + n4;
        stats.coupling <= stats.coupling + n1 + (n2 << 1);
      end
    end
  end
endmodule
