// tb_mel_router: a Mel router at column 1, row 1 of the 4x4 mesh. Random
// multicast flits are injected locally and arrive on the west and north lanes;
// outputs accept at random. Every copy leaving a port must carry only the
// destinations of that port's subtree (Y-then-X tree), no destination may be
// served twice, every destination must be served, and replication to several
// outputs in one cycle must occur.
module tb_mel_router;
  import monet_pkg::*;
  localparam int XI = 1, YI = 1, ME = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic lin_valid [4][2], lin_pop [4][2], lout_valid [4][2], lout_ready [4][2], req [4];
  mel_flit_t lin_flit [4][2], lout_flit [4][2];
  logic inj_valid, inj_ready, ej_valid, ej_ready;
  mel_flit_t inj_flit, ej_flit;
  logic [15:0] mcast_cnt;
  int checks = 0, failures = 0;
  mel_router #(.X_ID(XI), .Y_ID(YI)) dut (.*);

  localparam int NF = 300;
  logic [15:0] want [NF], got [NF];
  int n_inj = 0, n_w = 0, n_n = 0;
  bit go = 0;
  bit rdy [4][2], erdy;

  function automatic logic [15:0] region(input int p);
    logic [15:0] m = '0;
    for (int j = 0; j < 16; j++) begin
      int jx, jy;
      jx = j % 4; jy = j / 4;
      case (p)
        0: m[j] = (j == ME);
        1: m[j] = jy < YI;
        2: m[j] = jy == YI && jx > XI;
        3: m[j] = jy > YI;
        default: m[j] = jy == YI && jx < XI;
      endcase
    end
    return m;
  endfunction

  // flits arriving from the west may only target the east part of the tree
  // (row 1, columns >= 1, plus rows below and above as the tree allows);
  // flits from the north only rows >= 1.
  function automatic logic [15:0] rnd_dest(input int src);
    logic [15:0] d;
    d = 16'($urandom) & 16'($urandom);
    if (src == 1) d &= ~region(4);                    // from west: not back west
    if (src == 2) d &= region(3) | region(0);         // from north: own column, rows below or here
    if (d == 0) d = 16'(1 << ME);
    return d;
  endfunction

  logic [15:0] dest_inj, dest_w, dest_n;
  always_comb begin
    for (int d = 0; d < 4; d++)
      for (int l = 0; l < 2; l++) begin
        lin_valid[d][l] = 1'b0; lin_flit[d][l] = '0;
        lout_ready[d][l] = rdy[d][l];
      end
    ej_ready = erdy;
    inj_valid = go && n_inj < 100;
    inj_flit = '0; inj_flit.dest = dest_inj; inj_flit.data[0] = data_t'(n_inj);
    lin_valid[3][0] = go && n_w < 100;
    lin_flit[3][0] = '0; lin_flit[3][0].dest = dest_w; lin_flit[3][0].data[0] = data_t'(100 + n_w);
    lin_valid[0][1] = go && n_n < 100;
    lin_flit[0][1] = '0; lin_flit[0][1].dest = dest_n; lin_flit[0][1].data[0] = data_t'(200 + n_n);
  end

  task automatic take(input mel_flit_t f, input int p);
    int id;
    id = int'(f.data[0]);
    checks += 2;
    if ((f.dest & ~region(p)) != 0) begin failures++; $display("flit %0d port %0d carries foreign dests %h", id, p, f.dest); end
    if ((got[id] & f.dest) != 0) begin failures++; $display("flit %0d dest served twice", id); end
    got[id] |= f.dest;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 4; d++)
      for (int l = 0; l < 2; l++)
        if (lout_valid[d][l] && lout_ready[d][l]) take(lout_flit[d][l], d + 1);
    if (ej_valid && ej_ready) take(ej_flit, 0);
    if (inj_valid && inj_ready) begin want[n_inj] = dest_inj; n_inj <= n_inj + 1; dest_inj <= rnd_dest(0); end
    if (lin_pop[3][0]) begin want[100 + n_w] = dest_w; n_w <= n_w + 1; dest_w <= rnd_dest(1); end
    if (lin_pop[0][1]) begin want[200 + n_n] = dest_n; n_n <= n_n + 1; dest_n <= rnd_dest(2); end
  end

  always @(negedge clk) begin
    for (int d = 0; d < 4; d++) for (int l = 0; l < 2; l++) rdy[d][l] = ($urandom % 3) != 0;
    erdy = ($urandom % 3) != 0;
  end

  initial begin
    for (int i = 0; i < NF; i++) begin want[i] = '0; got[i] = '0; end
    dest_inj = rnd_dest(0); dest_w = rnd_dest(1); dest_n = rnd_dest(2);
    repeat (2) @(negedge clk); rst_n = 1; go = 1;
    repeat (1500) @(negedge clk);
    checks += 2;
    if (n_inj != 100 || n_w != 100 || n_n != 100) begin failures++; $display("accepted %0d %0d %0d", n_inj, n_w, n_n); end
    if (mcast_cnt == 0) begin failures++; $display("no multicast replication"); end
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (got[i] != want[i]) begin failures++; $display("flit %0d wanted %h got %h", i, want[i], got[i]); end
    end
    $display("replication cycles %0d", mcast_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
