// tb_ni_lane: stimulus and scoreboard for one encoder -> link -> decoder
// lane, shared by the NI and top-level testbenches.
//
// It sends NFLITS flits (about one in eight a header; payloads alternate
// between random values and a counter, so the Gray stage matters). During
// the first PHASE1 flits the source sends every cycle and the sink is always
// ready, and the 2-cycle latency is checked; afterwards both sides pause at
// random. Checked: every word that appears on the link against the
// reference encoder (Gray code, then the scheme's choice from the previous
// link word; headers raw), every delivered flit against what was sent, in
// order, and the latency. It counts the action taken on each body flit
// (none/even/odd/full, from the reference), headers, source stalls and the
// coupling cost of the coded link against sending the Gray and the binary
// payload uncoded.
module tb_ni_lane
  import tb_ref_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned SCHEME = 1,
  parameter int unsigned NFLITS = 2000,
  parameter int unsigned PHASE1 = 200,
  localparam int unsigned PW    = (SCHEME == 3) ? W - 2 : W - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_valid,
  input  logic          in_ready,
  output logic          in_hdr,
  output logic [PW-1:0] in_data,
  input  logic [W-1:0]  link_data,
  input  logic          out_valid,
  output logic          out_ready,
  input  logic          out_hdr,
  input  logic [PW-1:0] out_data,
  output int            checks,
  output int            failures,
  output bit            done,
  output int            n_act[4],
  output int            n_hdr,
  output int            n_stall,
  output longint        link_cost,
  output longint        gray_cost,
  output longint        bin_cost
);
  typedef struct { logic hdr; logic [PW-1:0] data; longint t; } flit_t;
  flit_t sent[$];
  longint cyc = 0;
  int n_sent = 0, n_recv = 0;
  word_t prev_link = '0, prev_gray = '0, prev_bin = '0;
  logic [PW-1:0] counter = '0;
  bit check_link = 0;
  word_t exp_link;

  function automatic flit_t new_flit();
    flit_t f;
    f.hdr = (($urandom % 8) == 0);
    if (($urandom % 2) != 0) f.data = PW'(rand_word(PW));
    else begin counter = counter + PW'($urandom % 3); f.data = counter; end
    f.t = 0;
    return f;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL scheme %0d: %s", SCHEME, msg);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; n_hdr = 0; n_stall = 0;
    link_cost = 0; gray_cost = 0; bin_cost = 0;
    for (int k = 0; k < 4; k++) n_act[k] = 0;
  end

  // Both ends are sampled at the rising edge in one process, so the
  // order of events is fixed; new stimulus is applied at the falling edge.
  bit accepted = 0;
  int n_issued = 0;
  flit_t cur;

  always @(posedge clk) begin
    accepted = 0;
    if (rst_n && in_valid) begin
      if (in_ready) begin
        word_t x, g;
        accepted = 1;
        cur.t = cyc;
        sent.push_back(cur);
        x = word_t'(cur.data);
        g = gray(x);
        if (cur.hdr) begin
          exp_link = x;
          n_hdr++;
        end else begin
          case (SCHEME)
            1: exp_link = enc1(g, prev_link, W);
            2: exp_link = enc2(g, prev_link, W);
            default: exp_link = enc3(g, prev_link, W);
          endcase
          if (exp_link == g) n_act[0]++;
          else if (exp_link == (g ^ even_m(W))) n_act[1]++;
          else if (exp_link == (g ^ odd_m(W))) n_act[2]++;
          else n_act[3]++;
        end
        link_cost += longint'(cost(prev_link, exp_link, W));
        gray_cost += longint'(cost(prev_gray, cur.hdr ? x : g, W));
        bin_cost  += longint'(cost(prev_bin, x, W));
        prev_link = exp_link;
        prev_gray = cur.hdr ? x : g;
        prev_bin  = x;
        check_link = 1;
        n_sent++;
      end else n_stall++;
    end
    if (rst_n && out_valid && out_ready) begin
      flit_t e;
      checks++;
      if (sent.size() == 0) fail("flit delivered that was never sent");
      else begin
        e = sent.pop_front();
        if (out_hdr !== e.hdr || out_data !== e.data)
          fail($sformatf("flit %0d: got hdr=%0d %h, expected hdr=%0d %h",
                         n_recv, out_hdr, out_data, e.hdr, e.data));
        checks++;
        if (n_recv < int'(PHASE1) && cyc - e.t != 2)
          fail($sformatf("latency %0d cycles, expected 2", cyc - e.t));
      end
      n_recv++;
      if (n_recv == int'(NFLITS)) done = 1;
    end
    cyc = cyc + 1;
  end

  always @(negedge clk) begin
    if (check_link) begin
      checks++;
      if (word_t'(link_data) != exp_link)
        fail($sformatf("link word %h, expected %h", link_data, exp_link));
      check_link = 0;
    end
    if (rst_n && (!in_valid || accepted)) begin
      if (n_issued < int'(NFLITS) && (n_issued < int'(PHASE1) || ($urandom % 4) != 0)) begin
        cur = new_flit();
        in_valid = 1; in_hdr = cur.hdr; in_data = cur.data;
        n_issued++;
      end else in_valid = 0;
    end
    if (rst_n) out_ready = (n_recv < int'(PHASE1)) ? 1'b1 : (($urandom % 5) != 0);
  end

  initial begin
    in_valid = 0; in_hdr = 0; in_data = '0; out_ready = 1;
  end
endmodule
