// Testbench of modified_scan_chain (N=8).
//
// The clock has the duty-cycle-adjusted shape of a 1.6 GHz functional clock:
// period 625 ps, high for 547 ps. A reference model keeps its own copy of
// the N scan flops (rising edge) and N early capture flops (falling edge) and
// the testbench checks do_o and scan_out against it before every edge, under
// random se, ecse1/ecse2, scan_in and di, with di bits changing both before
// and inside the guard band. A directed case then repeats the aged-path
// example: di goes 11001110 -> 01001110 inside the guard band, one capture
// cycle and eight shift cycles must put out 0,1,0,0,0,0,0,0 on scan_out as
// the ECFF contents 01000000 are shifted, after the capture cycle has shown
// the last cell's comparison (0).

`timescale 1ps/1ps
module tb_modified_scan_chain;

  localparam int unsigned N      = 8;
  localparam int unsigned PERIOD = 625;
  localparam int unsigned HIGH   = 547;

  logic         clk = 1'b0;
  logic         se, scan_in, ecsi, ecse1, ecse2;
  logic [N-1:0] di, do_o;
  logic         scan_out;

  logic [N-1:0] dff_m;   // dff_m[k]: scan cell k
  logic [N-1:0] ecff_m;  // ecff_m[k]: early capture cell k
  int           checks = 0;
  int           failures = 0;
  int           n_shift_scan = 0, n_ec_capture = 0, n_ec_shift = 0, n_mismatch = 0;

  modified_scan_chain #(.N(N)) dut (
    .clk(clk), .se(se), .scan_in(scan_in), .ecsi(ecsi), .ecse1(ecse1), .ecse2(ecse2),
    .di(di), .do_o(do_o), .scan_out(scan_out)
  );

  initial forever begin
    clk = 1'b1;
    #(HIGH);
    clk = 1'b0;
    #(PERIOD - HIGH);
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] dff_as_do();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[N-1-k] = dff_m[k];
    return v;
  endfunction

  function automatic logic ecso_m(int k);
    return ecse2 ? ecff_m[k] : (ecff_m[k] ^ dff_m[k]);
  endfunction

  function automatic logic scan_out_m();
    return se ? dff_m[N-1] : ecso_m(N - 1);
  endfunction

  task automatic check_outputs(string where);
    checks++;
    if (do_o !== dff_as_do() || scan_out !== scan_out_m()) begin
      failures++;
      $display("%s mismatch at %0t: do_o=%b exp %b scan_out=%b exp %b",
               where, $time, do_o, dff_as_do(), scan_out, scan_out_m());
    end
  endtask

  // reference model updates, on the same edges as the design
  always @(negedge clk) begin
    logic [N-1:0] nxt;
    for (int k = 0; k < N; k++)
      nxt[k] = ecse1 ? ((k == 0) ? ecsi : ecso_m(k - 1)) : di[N-1-k];
    if (ecse1 && !ecse2) n_ec_capture++;
    if (ecse1 && ecse2)  n_ec_shift++;
    ecff_m <= nxt;
  end

  always @(posedge clk) begin
    logic [N-1:0] nxt;
    for (int k = 0; k < N; k++)
      nxt[k] = se ? ((k == 0) ? scan_in : dff_m[k-1]) : di[N-1-k];
    if (se) n_shift_scan++;
    dff_m <= nxt;
  end

  initial begin
    logic [N-1:0] got;
    se = 1'b0; scan_in = 1'b0; ecsi = 1'b0; ecse1 = 1'b0; ecse2 = 1'b0; di = '0;
    // two clean cycles so that model and design hold the same values
    repeat (2) @(posedge clk);
    #100;
    di = 8'h5a;
    repeat (2) @(posedge clk);

    // random phase
    for (int i = 0; i < 300; i++) begin
      #100;                                   // 100 ps after the rising edge
      se      = ($urandom % 4) == 0;
      ecse1   = ($urandom % 3) == 0;
      ecse2   = ecse1 && ($urandom % 2);
      scan_in = 1'($urandom);
      ecsi    = 1'($urandom);
      di      = N'($urandom);
      #300 check_outputs("high");             // 400 ps
      di[$urandom % N] ^= ($urandom % 2);     // a late change, still before the fall
      #140 check_outputs("pre-fall");         // 540 ps
      #20;                                    // 560 ps, inside the guard band
      if ($urandom % 2) begin
        di[$urandom % N] ^= 1'b1;
        n_mismatch++;
      end
      #50 check_outputs("pre-rise");          // 610 ps
      @(posedge clk);
    end

    // directed: aged first bit, as in the published simulation
    #100;
    se = 1'b0; ecse1 = 1'b0; ecse2 = 1'b0; ecsi = 1'b0;
    di = 8'b11001110;
    @(posedge clk);
    #100 di = 8'b11001110;
    @(negedge clk);                           // ECFF takes 11001110
    #10 di = 8'b01001110;                     // late arrival of bit 7
    @(posedge clk);                           // DFF takes 01001110
    #10;
    checks++;
    if (do_o !== 8'b01001110) begin failures++; $display("DO %b", do_o); end
    ecse1 = 1'b1;                             // capture cycle
    checks++;
    if (scan_out !== 1'b0) begin failures++; $display("last-cell comparison %b", scan_out); end
    @(negedge clk);                           // comparisons stored one cell on
    #1;
    for (int k = 0; k < N; k++) got[N-1-k] = ecff_m[k];
    checks++;
    if (got !== 8'b01000000) begin failures++; $display("ECFF contents %b", got); end
    @(posedge clk);
    #10 ecse2 = 1'b1;                         // shift cycles
    for (int s = 0; s < N; s++) begin
      checks++;
      if (scan_out !== ((s == N - 2) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("shift %0d scan_out=%b", s, scan_out);
      end
      @(negedge clk);
      #10;
    end
    ecse1 = 1'b0; ecse2 = 1'b0;

    checks++;
    if (n_shift_scan == 0 || n_ec_capture == 0 || n_ec_shift == 0 || n_mismatch == 0) begin
      failures++;
      $display("mode not exercised: scan %0d capture %0d shift %0d late %0d",
               n_shift_scan, n_ec_capture, n_ec_shift, n_mismatch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
