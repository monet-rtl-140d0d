// tb_mel_link: drives both sides of a reversible link with random traffic and
// checks that every flit arrives exactly once on the far side, that a one-sided
// backlog turns the other side's lane around (two flits per cycle accepted),
// and that lanes return to their owners when reversal is disabled.
module tb_mel_link;
  import monet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic rev_en = 1, req_a = 0, req_b = 0;
  logic a_out_valid [2], a_out_ready [2], a_in_valid [2], a_in_pop [2];
  logic b_out_valid [2], b_out_ready [2], b_in_valid [2], b_in_pop [2];
  mel_flit_t a_out_flit [2], a_in_flit [2], b_out_flit [2], b_in_flit [2];
  logic [15:0] rev_cnt;
  int checks = 0, failures = 0;
  mel_link dut (.*);

  bit a_want = 0, b_want = 0;
  bit rnd_a [2] = '{1, 1}, rnd_b [2] = '{1, 1};
  always @(negedge clk)
    for (int l = 0; l < 2; l++) begin rnd_a[l] = ($urandom % 4) != 0; rnd_b[l] = ($urandom % 4) != 0; end
  int a_seq = 0, b_seq = 0, dual = 0;
  bit got_ab [4096], got_ba [4096];

  // senders: each side offers one new flit per lane per cycle while it wants to
  always_comb begin
    req_a = a_want; req_b = b_want;
    for (int l = 0; l < 2; l++) begin
      a_out_valid[l] = a_want && a_out_ready[l];
      b_out_valid[l] = b_want && b_out_ready[l];
      a_out_flit[l] = '0; b_out_flit[l] = '0;
      a_out_flit[l].data[0] = data_t'(a_seq + ((l == 1 && a_out_valid[0]) ? 1 : 0));
      b_out_flit[l].data[0] = data_t'(b_seq + ((l == 1 && b_out_valid[0]) ? 1 : 0));
      a_in_pop[l] = a_in_valid[l] && rnd_a[l];
      b_in_pop[l] = b_in_valid[l] && rnd_b[l];
    end
  end

  always @(posedge clk) if (rst_n) begin
    int na, nb;
    na = 0; nb = 0;
    for (int l = 0; l < 2; l++) begin
      if (a_out_valid[l]) na++;
      if (b_out_valid[l]) nb++;
      if (b_in_pop[l]) begin
        int id; id = int'(b_in_flit[l].data[0]);
        checks++; if (got_ab[id]) begin failures++; $display("A->B %0d twice", id); end
        got_ab[id] = 1;
      end
      if (a_in_pop[l]) begin
        int id; id = int'(a_in_flit[l].data[0]);
        checks++; if (got_ba[id]) begin failures++; $display("B->A %0d twice", id); end
        got_ba[id] = 1;
      end
    end
    if (na == 2) dual++;
    a_seq <= a_seq + na;
    b_seq <= b_seq + nb;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // phase 1: only A has traffic -> lane 1 is lent to A
    a_want = 1; repeat (200) @(negedge clk); a_want = 0;
    repeat (20) @(negedge clk);
    checks++; if (rev_cnt == 0) begin failures++; $display("no reversal"); end
    checks++; if (dual < 50) begin failures++; $display("two-lane transfers only %0d", dual); end
    // phase 2: only B -> lane 1 returns to B, lane 0 lent to B
    b_want = 1; repeat (200) @(negedge clk); b_want = 0;
    repeat (20) @(negedge clk);
    // phase 3: both sides, reversal disabled
    rev_en = 0; a_want = 1; b_want = 1; repeat (200) @(negedge clk); a_want = 0; b_want = 0;
    repeat (30) @(negedge clk);
    checks += 2;
    if (dut.dir[0] != 1'b0 || dut.dir[1] != 1'b1) begin failures++; $display("lanes not home"); end
    if (a_seq == 0 || b_seq == 0) failures++;
    for (int i = 0; i < a_seq; i++) begin checks++; if (!got_ab[i]) begin failures++; $display("A->B %0d lost", i); end end
    for (int i = 0; i < b_seq; i++) begin checks++; if (!got_ba[i]) begin failures++; $display("B->A %0d lost", i); end end
    $display("sent A->B %0d, B->A %0d, dual-lane cycles %0d, reversals %0d", a_seq, b_seq, dual, rev_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
