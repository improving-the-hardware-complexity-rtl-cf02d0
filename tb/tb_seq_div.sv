// tb_seq_div: checks the sequential divider against the simulator's own
// signed division for directed corner cases and 300 random operand pairs of
// both signs, checks that done arrives exactly NW + 1 clocks after start and
// that busy blocks a new start, and checks the divide-by-zero result.
module tb_seq_div;
  localparam int NW = 48, DW = 22;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [NW-1:0] n, q;
  logic signed [DW-1:0] d;
  logic busy, done;
  int checks = 0, failures = 0;

  seq_div #(.NW(NW), .DW(DW)) dut (.clk(clk), .rst_n(rst_n), .start(start), .n(n), .d(d),
                                   .busy(busy), .done(done), .q(q));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic signed [NW-1:0] nv, logic signed [DW-1:0] dv);
    logic signed [NW-1:0] expq;
    int cyc;
    @(negedge clk);
    n = nv; d = dv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    if (dv == 0) expq = nv < 0 ? -((NW)'(1) <<< (NW-1)) + 1 : {1'b0, {(NW-1){1'b1}}};
    else         expq = nv / 48'(dv);
    checks++;
    if (q != expq) begin failures++; $display("FAIL %0d / %0d = %0d exp %0d", nv, dv, q, expq); end
    checks++;
    if (cyc != NW + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    n = '0; d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(48'sd100, 22'sd7);
    run(-48'sd100, 22'sd7);
    run(48'sd100, -22'sd7);
    run(-48'sd100, -22'sd7);
    run(48'sd5, 22'sd256000);
    run({1'b0, {47{1'b1}}}, 22'sd1);
    run(-48'sd123456789, 22'sd0);
    run(48'sd123456789, 22'sd0);
    run(48'sd9, -22'sd2097152);
    for (int i = 0; i < 300; i++)
      run(48'({$urandom, $urandom}) >>> $urandom_range(0, 40), 22'($urandom) >>> $urandom_range(0, 18));
    // A start while busy is ignored.
    @(negedge clk); n = 48'sd1000; d = 22'sd10; start = 1;
    @(negedge clk); n = 48'sd7; d = 22'sd7;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (q != 48'sd100) begin failures++; $display("FAIL start during busy changed the result: %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
