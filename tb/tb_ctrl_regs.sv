// tb_ctrl_regs: checks reset values, writes and read-back of the Maroc2
// set-up bytes and of the mode, hold-delay and multiplicity registers, the
// decoding of the mode register into the configuration, the G-port load
// strobe and the saturating event counters.
module tb_ctrl_regs;
  import mc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic e_sync = 1'b0, e_ovf = 1'b0, e_drop = 1'b0;
  logic [7:0] maroc [N_MAROC];
  logic gload;
  cfg_t cfg;
  logic [7:0] model [N_MAROC];
  int checks = 0, failures = 0, n_gload = 0;

  always #8 clk = ~clk;

  ctrl_regs dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata,
    .ev_sync_err(e_sync), .ev_fifo_ovf(e_ovf), .ev_adc_drop(e_drop), .maroc, .gload, .cfg);

  always @(posedge clk) if (rst_n && gload) n_gload++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(logic [6:0] a, logic [7:0] d);
    @(negedge clk) we = 1'b1; waddr = a; wdata = d;
    @(negedge clk) we = 1'b0;
  endtask

  // Combinational read port.
  task automatic rdchk(logic [6:0] a, logic [7:0] exp, string msg);
    raddr = a;
    #1 check(rdata == exp, $sformatf("%s: read %h, expected %h", msg, rdata, exp));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rdchk(R_MODE, 8'h03, "mode reset value");
    check(cfg.adc_en && cfg.adc_supp && !cfg.gate_mode, "mode reset decode");
    rdchk(R_HOLD_DLY, 8'd1, "hold delay reset value");
    check(cfg.hold_dly == 8'd1, "hold delay reset output");
    rdchk(7'd10, 8'd16, "gain reset value");
    rdchk(7'd0, 8'd0, "switch reset value");
    for (int i = 0; i < int'(N_MAROC); i++) model[i] = (i >= 6) ? 8'd16 : 8'd0;
    for (int k = 0; k < 200; k++) begin
      int a;
      logic [7:0] d;
      a = $urandom_range(N_MAROC - 1);
      d = 8'($urandom);
      wr(7'(a), d);
      model[a] = d;
    end
    for (int i = 0; i < int'(N_MAROC); i++) begin
      rdchk(7'(i), model[i], $sformatf("read-back byte %0d", i));
      check(maroc[i] == model[i], $sformatf("set-up output byte %0d", i));
    end
    wr(R_MODE, 8'b0011_0100);
    check(!cfg.adc_en && !cfg.adc_supp && cfg.gate_mode && cfg.trigout_mode == TO_MULT && cfg.sync_chk
          && !cfg.box_cond, "mode decode");
    wr(R_MODE, 8'h40);
    check(cfg.box_cond && !cfg.sync_chk && !cfg.adc_en, "mode bit 6: conditional readout");
    wr(R_MODE, 8'b0011_0100);
    wr(R_HOLD_DLY, 8'd9);
    wr(R_MULT, 8'd5);
    check(cfg.hold_dly == 8'd9 && cfg.mult_thr == 7'd5, "hold and multiplicity");
    rdchk(R_MULT, 8'd5, "multiplicity read-back");
    wr(R_GLOAD, 8'd0);
    @(negedge clk);
    check(n_gload == 1, "G-port load strobe");
    // counters
    @(negedge clk) e_sync = 1'b1; e_ovf = 1'b1;
    repeat (3) @(negedge clk);
    e_sync = 1'b0;
    repeat (300) @(negedge clk);
    e_ovf = 1'b0; e_drop = 1'b1;
    repeat (7) @(negedge clk);
    e_drop = 1'b0;
    rdchk(R_SYNC_ERR, 8'd3, "sync error count");
    rdchk(R_FIFO_OVF, 8'hFF, "overflow count saturates");
    rdchk(R_ADC_DROP, 8'd7, "drop count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
