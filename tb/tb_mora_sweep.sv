// Sweep over the operand counts and widths at which the linear array is evaluated:
// NOP from 4 to 128 at 16 and 64 bits, and 96-bit words (the widest width of the
// speed comparison). Every configuration must match the modular sum and the word-
// level CSA model on all of its vectors, and the wrap-around case must occur.
module tb_mora_sweep;
  localparam int NCFG = 18;
  localparam int CFG_NOP [NCFG] = '{4, 5, 8, 9, 16, 17, 32, 64, 128,
                                    4, 5, 9, 16, 33, 64, 128, 16, 128};
  localparam int CFG_N   [NCFG] = '{16, 16, 16, 16, 16, 16, 16, 16, 16,
                                    64, 64, 64, 64, 64, 64, 64, 96, 96};

  logic clk = 1'b0;
  int   checks = 0, failures = 0, wraps = 0;
  int   c_chk [NCFG], c_fail [NCFG], c_wrap [NCFG];
  logic c_done [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    sweep_cfg #(.NOP(CFG_NOP[g]), .N(CFG_N[g]), .NVEC(200)) u_cfg (
      .clk       (clk),
      .checks_o  (c_chk[g]),
      .failures_o(c_fail[g]),
      .wraps_o   (c_wrap[g]),
      .done_o    (c_done[g])
    );
  end

  function automatic bit all_done();
    foreach (c_done[g]) if (!c_done[g]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : collect
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      $display("NOP=%0d N=%0d checks=%0d failures=%0d wrapped=%0d",
               CFG_NOP[g], CFG_N[g], c_chk[g], c_fail[g], c_wrap[g]);
      checks   += c_chk[g];
      failures += c_fail[g];
      wraps    += c_wrap[g];
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
