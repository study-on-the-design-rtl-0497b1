// tb_barrel_shifter: self-checking test of the two barrel_shifter
// configurations used by the bfloat16 adder.
//
// Right shifter (12-bit word, 8-bit shift, sticky bit folded into bit 0,
// 26 phases) and left shifter (12-bit word, 4-bit shift, no sticky,
// 21 phases), plus the plain 4-bit shifter (2-bit shift amount, right, no
// sticky, 6 phases: two rows of multiplexers), get random words and shift amounts every phase tick; the
// results are compared with shifts computed here, including shifts of 12 and
// more that clear the word, and the latency of each is checked.
module tb_barrel_shifter;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [11:0] r_din = 0, l_din = 0, r_dout, l_dout;
  logic [7:0]  r_sh = 0;
  logic [3:0]  l_sh = 0;
  logic        r_ov, l_ov, f_ov;
  logic [3:0]  f_din = 0, f_dout;
  logic [1:0]  f_sh = 0;
  int checks = 0, failures = 0;
  localparam int N_OPS = 2000;

  barrel_shifter #(.WIDTH(12), .SHW(8), .LEFT(1'b0), .STICKY(1'b1), .PHASES(26)) u_r (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(r_din), .shamt(r_sh),
    .out_valid(r_ov), .dout(r_dout));
  barrel_shifter #(.WIDTH(12), .SHW(4), .LEFT(1'b1), .STICKY(1'b0), .PHASES(21)) u_l (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(l_din), .shamt(l_sh),
    .out_valid(l_ov), .dout(l_dout));

  barrel_shifter #(.WIDTH(4), .SHW(2), .LEFT(1'b0), .STICKY(1'b0), .PHASES(6)) u_f (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(f_din), .shamt(f_sh),
    .out_valid(f_ov), .dout(f_dout));

  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0, tr = 0, tl = 0, tf = 0;
  always @(posedge clk) tick <= tick + 1;

  logic [11:0] qr[$], ql[$];
  logic [3:0]  qf[$];
  always @(negedge clk) if (rst_n) begin
    if (r_ov) begin
      if (tr == 0) tr = tick;
      checks++;
      if (qr.size() == 0 || r_dout !== qr.pop_front()) begin
        failures++;
        if (failures < 20) $display("FAIL: right shift result %h", r_dout);
      end
    end
    if (l_ov) begin
      if (tl == 0) tl = tick;
      checks++;
      if (ql.size() == 0 || l_dout !== ql.pop_front()) begin
        failures++;
        if (failures < 20) $display("FAIL: left shift result %h", l_dout);
      end
    end
    if (f_ov) begin
      if (tf == 0) tf = tick;
      checks++;
      if (qf.size() == 0 || f_dout !== qf.pop_front()) begin
        failures++;
        if (failures < 20) $display("FAIL: 4-bit shift result %h", f_dout);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      logic [11:0] w, v, er, el;
      logic [7:0]  s;
      logic [3:0]  t, fw;
      logic [1:0]  fs;
      logic        lost;
      w = 12'($urandom);
      v = 12'($urandom);
      s = (i % 2 == 0) ? 8'($urandom_range(0, 15)) : 8'($urandom);
      t = 4'($urandom);
      // right: bits shifted below bit 0 are ORed into bit 0
      lost = 1'b0;
      for (int k = 0; k < 12; k++) if (w[k] && k < int'(s)) lost = 1'b1;
      er = (int'(s) >= 12) ? 12'd0 : (w >> s);
      er[0] = er[0] | lost;
      el = (int'(t) >= 12) ? 12'd0 : (v << t);
      fw = 4'($urandom);
      fs = 2'($urandom);
      @(negedge clk);
      if (i == 0) t_in = tick;
      in_valid = 1;
      r_din = w; r_sh = s; l_din = v; l_sh = t; f_din = fw; f_sh = fs;
      qf.push_back(fw >> fs);
      qr.push_back(er);
      ql.push_back(el);
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (qr.size() != 0 || ql.size() != 0 || qf.size() != 0) begin failures++; $display("FAIL: results missing"); end
    checks++;
    if (tr - t_in != 26) begin failures++; $display("FAIL: right latency %0d", tr - t_in); end
    checks++;
    if (tl - t_in != 21) begin failures++; $display("FAIL: left latency %0d", tl - t_in); end
    checks++;
    if (tf - t_in != 6) begin failures++; $display("FAIL: 4-bit latency %0d", tf - t_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_OPS + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
