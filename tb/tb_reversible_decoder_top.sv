// tb_reversible_decoder_top: end-to-end test of all six reversible decoders
// at the default size (N = 4), with the top's parameters left alone.
//
// Every 4-bit input word is applied once. For each decoder the test checks
// the one-hot output against the value of the bits that decoder reads (I0
// most significant), checks every garbage line against its expected value,
// and checks that the two designs of each size agree. It counts, per
// decoder, how many distinct output lines were driven high and how often the
// select-bit copy on the garbage lines took each value; a line never driven
// high or a garbage copy never seen at both values counts as a failure.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_reversible_decoder_top;
  localparam int N  = 4;
  localparam int GU = 2**(N-1) + N - 4;  // garbage width of the UM design
  localparam int GO = N - 2;             // garbage width of the OM design

  logic [N-1:0]     i;
  logic [3:0]       y24_um, y24_som;
  logic [1:0]       g24_um;
  logic [7:0]       y38_um, y38_om;
  logic [2:0]       g38_um;
  logic             g38_om;
  logic [2**N-1:0]  yn_um, yn_om;
  logic [GU-1:0]    gn_um;
  logic [GO-1:0]    gn_om;

  int checks = 0, failures = 0;

  reversible_decoder_top dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL i=%b %s got %h expected %h", i, what, got, exp_v);
    end
  endtask

  // Coverage: which lines went high, and how often each garbage copy was 0/1.
  logic [3:0]      hit24_um = '0, hit24_som = '0;
  logic [7:0]      hit38_um = '0, hit38_om = '0;
  logic [2**N-1:0] hitn_um = '0, hitn_om = '0;
  int copy_seen [2][6];  // [value][decoder]

  initial begin
    int v2, v3;
    logic [63:0] eg_um, eg_om;
    foreach (copy_seen[a, b]) copy_seen[a][b] = 0;

    for (int v = 0; v < 2**N; v++) begin
      i = N'(v);
      #1;
      v2 = v >> (N - 2);
      v3 = v >> (N - 3);

      expect_eq("y24_um", 64'(y24_um), 64'(1) << v2);
      expect_eq("y24_som", 64'(y24_som), 64'(1) << v2);
      expect_eq("y38_um", 64'(y38_um), 64'(1) << v3);
      expect_eq("y38_om", 64'(y38_om), 64'(1) << v3);
      expect_eq("yn_um", 64'(yn_um), 64'(1) << v);
      expect_eq("yn_om", 64'(yn_om), 64'(1) << v);
      expect_eq("2-to-4 designs agree", 64'(y24_um), 64'(y24_som));
      expect_eq("3-to-8 designs agree", 64'(y38_um), 64'(y38_om));
      expect_eq("n-to-2^n designs agree", 64'(yn_um), 64'(yn_om));

      // Garbage: copies of select bits; UM X outputs are 0.
      expect_eq("g24_um", 64'(g24_um), {62'd0, i[N-1], 1'b0});
      expect_eq("g38_um", 64'(g38_um), {61'd0, 2'b00, i[N-3]});
      expect_eq("g38_om", 64'(g38_om), {63'd0, i[N-3]});
      eg_um = '0;
      eg_um[0] = i[N-3];
      eg_um[GU-1] = i[0];  // N = 4: last layer adds 4 X lines then the copy of I3
      eg_om = '0;
      for (int j = 0; j < GO; j++) eg_om[j] = i[N-3-j];
      expect_eq("gn_um", 64'(gn_um), eg_um);
      expect_eq("gn_om", 64'(gn_om), eg_om);

      hit24_um |= y24_um;  hit24_som |= y24_som;
      hit38_um |= y38_um;  hit38_om  |= y38_om;
      hitn_um  |= yn_um;   hitn_om   |= yn_om;
      copy_seen[g24_um[1]][0]++;
      copy_seen[g38_um[0]][1]++;
      copy_seen[g38_om][2]++;
      copy_seen[gn_um[0]][3]++;
      copy_seen[gn_um[GU-1]][4]++;
      copy_seen[gn_om[GO-1]][5]++;
    end

    // Every decoded line of every design must have been selected once.
    expect_eq("lines hit 2-to-4 UM", 64'(hit24_um), 64'hF);
    expect_eq("lines hit 2-to-4 SOM", 64'(hit24_som), 64'hF);
    expect_eq("lines hit 3-to-8 UM", 64'(hit38_um), 64'hFF);
    expect_eq("lines hit 3-to-8 OM", 64'(hit38_om), 64'hFF);
    checks++;
    if (hitn_um !== '1 || hitn_om !== '1) begin
      failures++;
      $display("FAIL n-to-2^n lines never selected: um %b om %b", ~hitn_um, ~hitn_om);
    end
    for (int d = 0; d < 6; d++) begin
      checks++;
      if (copy_seen[0][d] == 0 || copy_seen[1][d] == 0) begin
        failures++;
        $display("FAIL garbage copy %0d never toggled (%0d zeros, %0d ones)", d,
                 copy_seen[0][d], copy_seen[1][d]);
      end
    end
    $display("coverage: lines selected 2-to-4 %0d/%0d, 3-to-8 %0d/%0d, n %0d/%0d",
             $countones(hit24_um), $countones(hit24_som), $countones(hit38_um),
             $countones(hit38_om), $countones(hitn_um), $countones(hitn_om));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
