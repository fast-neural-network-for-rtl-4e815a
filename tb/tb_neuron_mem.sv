// tb_neuron_mem -- checks the storage unit for N = 16 with P = 4 ports
// against a shadow copy: host weight writes and record reads, then random
// cycles of own-layer writes with separate weight/y/delta enables and
// previous-layer delta writes, checking every read port after each cycle.
module tb_neuron_mem;
  import tsu_pkg::*;

  localparam int N = 16;
  localparam int P = 4;
  localparam int M = 3;

  int checks = 0, failures = 0;

  logic        clk = 0;
  logic [3:0]  cur_layer;
  logic [3:0]  own_line [P];
  neuron_t     own_rd   [P];
  logic        own_we_w [P], own_we_y [P], own_we_d [P];
  neuron_t     own_wd   [P];
  logic [3:0]  prev_line [P];
  data_t       prev_rd_y [P];
  logic        prev_we_d [P];
  delta_t      prev_wd_d [P];
  logic [3:0]  h_layer, h_line;
  logic        h_we_w;
  logic [1:0]  h_widx;
  weight_t     h_wd;
  neuron_t     h_rd;

  neuron_mem #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  int sw[M+1][N][4], sy[M+1][N], sd[M+1][N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic idle();
    for (int p = 0; p < P; p++) begin
      own_we_w[p] = 0; own_we_y[p] = 0; own_we_d[p] = 0; prev_we_d[p] = 0;
    end
    h_we_w = 0;
  endtask

  // Distinct random lines for the P ports.
  task automatic pick_lines(output logic [3:0] ln [P]);
    int perm[N];
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i));
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int p = 0; p < P; p++) ln[p] = 4'(perm[p]);
  endtask

  task automatic check_reads();
    for (int p = 0; p < P; p++) begin
      for (int i = 0; i < 4; i++)
        check(int'(own_rd[p].w[i]) == sw[int'(cur_layer)][own_line[p]][i], $sformatf("own w port %0d", p));
      check(int'(own_rd[p].y) == sy[int'(cur_layer)][own_line[p]], $sformatf("own y port %0d", p));
      check(int'(own_rd[p].d) == sd[int'(cur_layer)][own_line[p]], $sformatf("own d port %0d", p));
      if (cur_layer > 1)
        check(int'(prev_rd_y[p]) == sy[int'(cur_layer)-1][prev_line[p]], $sformatf("prev y port %0d", p));
    end
    check(int'(h_rd.y) == sy[int'(h_layer)][h_line] && int'(h_rd.d) == sd[int'(h_layer)][h_line] &&
          int'(h_rd.w[0]) == sw[int'(h_layer)][h_line][0] && int'(h_rd.w[3]) == sw[int'(h_layer)][h_line][3],
          "host read");
  endtask

  initial begin
    idle();
    cur_layer = 1; h_layer = 1; h_line = 0; h_widx = 0; h_wd = 0;
    for (int p = 0; p < P; p++) begin
      own_line[p] = 0; prev_line[p] = 0; own_wd[p] = '0; prev_wd_d[p] = '0;
    end
    // host writes every weight, own ports write every y and delta
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++) begin
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          h_layer = 4'(l); h_line = 4'(q); h_widx = 2'(i);
          h_wd = 16'($urandom_range(65535));
          h_we_w = 1;
          sw[l][q][i] = int'(h_wd);
          @(negedge clk);
          h_we_w = 0;
          #1 check(int'(h_rd.w[i]) == sw[l][q][i], "host weight write/read");
        end
      end
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q += P) begin
        @(negedge clk);
        cur_layer = 4'(l);
        for (int p = 0; p < P; p++) begin
          own_line[p] = 4'(q + p);
          own_wd[p].y = 16'($urandom_range(65535));
          own_wd[p].d = 16'($urandom_range(65535));
          own_wd[p].w = '0;
          own_we_y[p] = 1; own_we_d[p] = 1;
          sy[l][q+p] = int'(own_wd[p].y);
          sd[l][q+p] = int'(own_wd[p].d);
        end
        @(negedge clk);
        idle();
      end
    // random traffic
    repeat (400) begin
      @(negedge clk);
      cur_layer = 4'($urandom_range(M - 1) + 1);
      pick_lines(own_line);
      pick_lines(prev_line);
      for (int p = 0; p < P; p++) begin
        own_we_w[p] = 1'($urandom_range(1));
        own_we_y[p] = 1'($urandom_range(1));
        own_we_d[p] = 1'($urandom_range(1));
        prev_we_d[p] = (cur_layer > 1) ? 1'($urandom_range(1)) : 1'b0;
        own_wd[p] = neuron_t'({$urandom, $urandom, $urandom});
        prev_wd_d[p] = 16'($urandom_range(65535));
      end
      h_layer = 4'($urandom_range(M - 1) + 1);
      h_line = 4'($urandom_range(N - 1));
      #1 check_reads();
      // update shadow with what the edge will write
      for (int p = 0; p < P; p++) begin
        if (own_we_w[p]) for (int i = 0; i < 4; i++) sw[int'(cur_layer)][own_line[p]][i] = int'(own_wd[p].w[i]);
        if (own_we_y[p]) sy[int'(cur_layer)][own_line[p]] = int'(own_wd[p].y);
        if (own_we_d[p]) sd[int'(cur_layer)][own_line[p]] = int'(own_wd[p].d);
        if (prev_we_d[p]) sd[int'(cur_layer)-1][prev_line[p]] = int'(prev_wd_d[p]);
      end
      @(negedge clk);
      idle();
      #1 check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
