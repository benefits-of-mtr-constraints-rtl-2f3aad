// tb_sts_column_gen: steps through every column of the default generator
// (order 169) and checks that there are n(6n+1) = 4732 columns, that
// "last" marks only the final one, that every column holds three distinct
// checks below 169, that every pair of checks is covered by exactly one
// column (a Steiner triple system), that every check has weight 84, and that
// the generator wraps back to the first column.
module tb_sts_column_gen;
  localparam int NS = 28;
  localparam int V  = 6 * NS + 1;
  localparam int B  = NS * V;
  logic clk = 0, rst_n = 1, restart = 0, step = 0;
  // a real falling edge of rst_n clears every asynchronously reset register
  // before the first clock edge, whatever its power-up value
  initial #1 rst_n = 0;
  logic [$clog2(V)-1:0] chk0, chk1, chk2;
  logic last;
  int checks = 0, failures = 0;
  bit pair [V][V];
  int deg [V];
  int first [3];

  always #5 clk = ~clk;

  sts_column_gen #(.STS_N(NS)) dut (.*);

  task automatic mark(int a, int b);
    if (pair[a][b]) begin failures++; if (failures < 10) $display("pair %0d,%0d twice", a, b); end
    pair[a][b] = 1; pair[b][a] = 1;
  endtask

  initial begin
    int ncols, npairs;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    restart = 1; @(negedge clk); restart = 0;
    first[0] = chk0; first[1] = chk1; first[2] = chk2;
    step = 1;
    ncols = 0;
    for (int j = 0; j < B; j++) begin
      int a, b, c;
      a = chk0; b = chk1; c = chk2;
      checks++;
      if (a == b || b == c || a == c || a >= V || b >= V || c >= V) begin
        failures++; $display("column %0d bad triple %0d %0d %0d", j, a, b, c);
      end else begin
        mark(a, b); mark(b, c); mark(a, c);
        deg[a]++; deg[b]++; deg[c]++;
      end
      checks++;
      if (last != (j == B - 1)) begin failures++; $display("last=%b at column %0d", last, j); end
      ncols++;
      @(negedge clk);
    end
    step = 0;
    npairs = 0;
    for (int a = 0; a < V; a++) for (int b = a + 1; b < V; b++) if (pair[a][b]) npairs++;
    checks++;
    if (npairs != V * (V - 1) / 2) begin failures++; $display("pairs covered %0d", npairs); end
    for (int a = 0; a < V; a++) begin
      checks++;
      if (deg[a] != (V - 1) / 2) begin failures++; $display("check %0d weight %0d", a, deg[a]); end
    end
    checks++;
    if (chk0 != first[0] || chk1 != first[1] || chk2 != first[2]) begin failures++; $display("no wrap"); end
    $display("columns %0d", ncols);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
