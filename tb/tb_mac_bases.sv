// tb_mac_bases: runs both self-checking MAC organisations with the residue
// widths the design is meant for besides the default mod 7: mod 3 (N = 2),
// mod 15 (N = 4) and an 8-bit checksum, mod 255 (N = 8), all on the 32-bit
// main datapath with a 64-bit accumulator. Each lane checks its MAC against
// a reference model and injects main-datapath faults that must be flagged
// at the right latency; every lane must see wraparounds and detections.
module tb_mac_bases;
  localparam int NL = 6;
  localparam int NCYC = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NL];
  int   lchecks [NL], lfail [NL], ldet [NL], lwrap [NL];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_lane_check #(.N(2), .PIPE(1'b0), .NCYC(NCYC)) l0 (.clk, .rst_n, .done(done[0]), .checks(lchecks[0]), .failures(lfail[0]), .detected(ldet[0]), .wraps(lwrap[0]));
  mac_lane_check #(.N(4), .PIPE(1'b0), .NCYC(NCYC)) l1 (.clk, .rst_n, .done(done[1]), .checks(lchecks[1]), .failures(lfail[1]), .detected(ldet[1]), .wraps(lwrap[1]));
  mac_lane_check #(.N(8), .PIPE(1'b0), .NCYC(NCYC)) l2 (.clk, .rst_n, .done(done[2]), .checks(lchecks[2]), .failures(lfail[2]), .detected(ldet[2]), .wraps(lwrap[2]));
  mac_lane_check #(.N(2), .PIPE(1'b1), .NCYC(NCYC)) l3 (.clk, .rst_n, .done(done[3]), .checks(lchecks[3]), .failures(lfail[3]), .detected(ldet[3]), .wraps(lwrap[3]));
  mac_lane_check #(.N(4), .PIPE(1'b1), .NCYC(NCYC)) l4 (.clk, .rst_n, .done(done[4]), .checks(lchecks[4]), .failures(lfail[4]), .detected(ldet[4]), .wraps(lwrap[4]));
  mac_lane_check #(.N(8), .PIPE(1'b1), .NCYC(NCYC)) l5 (.clk, .rst_n, .done(done[5]), .checks(lchecks[5]), .failures(lfail[5]), .detected(ldet[5]), .wraps(lwrap[5]));

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NL; i++) wait (done[i]);
    for (int i = 0; i < NL; i++) begin
      checks += lchecks[i] + 2;
      failures += lfail[i];
      if (ldet[i] == 0) begin failures++; $display("FAIL lane %0d never detected a fault", i); end
      if (lwrap[i] == 0) begin failures++; $display("FAIL lane %0d never wrapped", i); end
      $display("  lane %0d: checks %0d failures %0d detections %0d wraps %0d", i, lchecks[i], lfail[i], ldet[i], lwrap[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
