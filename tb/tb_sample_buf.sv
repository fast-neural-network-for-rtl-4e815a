// tb_sample_buf -- fills the sample buffer through its write port, then
// reads it back through all P read ports at random addresses, and checks
// that a write leaves the other samples alone.
module tb_sample_buf;
  import tsu_pkg::*;

  localparam int N = 16;
  localparam int P = 8;

  int checks = 0, failures = 0;
  int shadow[N];

  logic        clk = 0;
  logic        we;
  logic [3:0]  waddr;
  data_t       wdata;
  logic [3:0]  raddr [P];
  data_t       rdata [P];

  sample_buf #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write(int a, int v);
    @(negedge clk);
    we = 1; waddr = 4'(a); wdata = 16'(v);
    @(negedge clk);
    we = 0;
    shadow[a] = v;
  endtask

  task automatic read_all();
    for (int r = 0; r < 20; r++) begin
      for (int p = 0; p < P; p++) raddr[p] = 4'($urandom_range(N - 1));
      #1;
      for (int p = 0; p < P; p++)
        check(int'(rdata[p]) == shadow[raddr[p]], $sformatf("port %0d addr %0d", p, raddr[p]));
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int a = 0; a < N; a++) write(a, int'($urandom_range(65535)) - 32768);
    read_all();
    repeat (30) begin
      write(int'($urandom_range(N - 1)), int'($urandom_range(65535)) - 32768);
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
