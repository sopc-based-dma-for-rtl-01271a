// tb_daq_input: checks the input MUX (external port or simulator) and the
// overrun handling: a block that meets a full FIFO is not written and is
// counted, and the next written block carries the EvOverrun tag.
module tb_daq_input;
  import daq_pkg::*;
  logic clk = 0, rst_n = 1;
  logic sel_sim = 0, ext_valid = 0, sim_valid = 0, wr_full = 0;
  logic [SAMPLE_W-1:0] ext_data = '0, sim_data = '0;
  logic [3:0] ext_tags = '0, sim_tags = '0;
  logic wr_en;
  block_t wr_data;
  logic [31:0] dropped;
  int checks = 0, failures = 0;

  daq_input dut (.clk_s(clk), .rst_n, .sel_sim, .ext_valid, .ext_data, .ext_tags,
                 .sim_valid, .sim_data, .sim_tags, .wr_en, .wr_data, .wr_full, .dropped);

  // reset: give the asynchronous reset a falling edge at the start
  initial begin
    #1;
    rst_n = 0;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_drop = 0;
    bit pend = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      sel_sim   = (i / 50) % 2 == 1;
      ext_valid = $urandom_range(0, 1);
      sim_valid = $urandom_range(0, 1);
      ext_data  = {4{$urandom}};
      sim_data  = {4{$urandom}};
      ext_tags  = 4'($urandom);
      sim_tags  = 4'($urandom);
      wr_full   = ($urandom_range(0, 3) == 0);
      #1;
      begin
        logic v; logic [SAMPLE_W-1:0] d; logic [3:0] tg;
        v  = sel_sim ? sim_valid : ext_valid;
        d  = sel_sim ? sim_data  : ext_data;
        tg = sel_sim ? sim_tags  : ext_tags;
        check(wr_en == (v && !wr_full), $sformatf("wr_en at %0d", i));
        if (v && !wr_full) begin
          check(wr_data.data == d, $sformatf("data at %0d", i));
          check(wr_data.tags == tags_t'({pend, tg}), $sformatf("tags at %0d", i));
          pend = 0;
        end
        if (v && wr_full) begin
          pend = 1;
          exp_drop++;
        end
      end
      @(posedge clk); #1;
      check(dropped == 32'(exp_drop), $sformatf("dropped %0d want %0d", dropped, exp_drop));
    end
    check(exp_drop > 10, "overruns exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
