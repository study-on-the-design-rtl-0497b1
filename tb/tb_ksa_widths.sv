// tb_ksa_widths: both Kogge-Stone adder variants at 4, 8 and 16 bits.
//
// Instantiates ksa_maj3 and ksa_maj5 at each width, drives every instance with
// random operands and carry-ins on every phase tick, checks each sum against
// a + b + cin, and measures each latency. Expected depths are
// 4 + 2*log2(W) phases for majority-3 and 3 + log2(W) for majority-5; at every
// width the majority-5 adder must be the faster one, and the gap must grow
// with the width.
module tb_ksa_widths;
  localparam int N_OPS = 600;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] a = 0, b = 0;
  logic        cin = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  longint unsigned tick = 0, t_in = 0;
  always @(posedge clk) tick <= tick + 1;

  localparam int NW = 3;
  localparam int WS [NW] = '{4, 8, 16};
  longint unsigned lat3 [NW], lat5 [NW];

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WS[w];
    logic [W:0] s3, s5;
    logic       v3, v5;
    ksa_maj3 #(.WIDTH(W)) u3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[W-1:0]),
                              .b(b[W-1:0]), .cin(cin), .out_valid(v3), .sum(s3));
    ksa_maj5 #(.WIDTH(W)) u5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[W-1:0]),
                              .b(b[W-1:0]), .cin(cin), .out_valid(v5), .sum(s5));
    logic [W:0] q3[$], q5[$];
    always @(negedge clk) if (rst_n && in_valid) begin
      q3.push_back({1'b0, a[W-1:0]} + {1'b0, b[W-1:0]} + (W+1)'(cin));
      q5.push_back({1'b0, a[W-1:0]} + {1'b0, b[W-1:0]} + (W+1)'(cin));
    end
    always @(negedge clk) if (rst_n) begin
      if (v3) begin
        if (lat3[w] == 0) lat3[w] = tick - t_in;
        checks++;
        if (q3.size() == 0 || s3 !== q3.pop_front()) begin
          failures++;
          $display("FAIL: maj3 width %0d sum %h", W, s3);
        end
      end
      if (v5) begin
        if (lat5[w] == 0) lat5[w] = tick - t_in;
        checks++;
        if (q5.size() == 0 || s5 !== q5.pop_front()) begin
          failures++;
          $display("FAIL: maj5 width %0d sum %h", W, s5);
        end
      end
    end
  end

  initial begin
    foreach (lat3[i]) begin lat3[i] = 0; lat5[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      @(posedge clk);                   // drive just after the tick so the
      #1;                               // negedge queue sees the new operands
      if (i == 0) t_in = tick;
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); in_valid = 1;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (30) @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      int l;
      l = $clog2(WS[w]);
      $display("width %0d: majority-3 latency %0d phases, majority-5 latency %0d phases",
               WS[w], lat3[w], lat5[w]);
      checks++;
      if (lat3[w] != longint'(4 + 2 * l)) begin failures++; $display("FAIL: maj3 latency"); end
      checks++;
      if (lat5[w] != longint'(3 + l)) begin failures++; $display("FAIL: maj5 latency"); end
      checks++;
      if (lat5[w] >= lat3[w]) begin failures++; $display("FAIL: maj5 not faster"); end
      if (w > 0) begin
        checks++;
        if (lat3[w] - lat5[w] <= lat3[w-1] - lat5[w-1]) begin
          failures++;
          $display("FAIL: latency gap does not grow with width");
        end
      end
    end
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
