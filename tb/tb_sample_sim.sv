// tb_sample_sim: checks the samples simulator: block period RATE+1, the
// counting pattern of eight 16-bit samples per block, the tags on block
// EV_AT only, the restart of the pattern when re-enabled, and silence while
// disabled.
module tb_sample_sim;
  import daq_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  logic [15:0] rate;
  logic [31:0] ev_at;
  logic [3:0]  ev_tags;
  logic out_valid;
  logic [SAMPLE_W-1:0] out_data;
  logic [3:0] out_tags;
  int checks = 0, failures = 0;

  sample_sim dut (.clk_s(clk), .rst_n, .en, .rate, .ev_at, .ev_tags,
                  .out_valid, .out_data, .out_tags);

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

  task automatic run(input int r, input int at, input int nblk);
    int last_t, k, t;
    logic [15:0] exp;
    rate = 16'(r); ev_at = at; ev_tags = 4'b1001;
    @(negedge clk) en = 1;
    k = 0; t = 0; last_t = -1;
    while (k < nblk) begin
      @(posedge clk); #1; t++;
      if (out_valid) begin
        if (last_t >= 0) check(t - last_t == r + 1, $sformatf("period %0d != %0d", t - last_t, r + 1));
        last_t = t;
        for (int j = 0; j < 8; j++) begin
          exp = 16'(8 * k + j);
          check(out_data[16*j +: 16] == exp, $sformatf("block %0d word %0d = %h, want %h", k, j, out_data[16*j +: 16], exp));
        end
        check(out_tags == ((k == at) ? 4'b1001 : 4'b0000), $sformatf("tags of block %0d", k));
        k++;
      end
    end
    @(negedge clk) en = 0;
    repeat (3) @(posedge clk);
    repeat (20) begin
      @(posedge clk); #1;
      check(!out_valid, "output while disabled");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 5, 40);
    run(3, 0, 20);
    run(1, 100, 30);
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
