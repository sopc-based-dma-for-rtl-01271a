// tb_fifoin: checks the dual-clock FIFO with unrelated write and read clocks:
// every block comes out once and in order, full is raised after DEPTH+1
// blocks with no reads (and writes while full are ignored), rd_used counts
// the blocks held, and a ready reader drains one block per read clock.
module tb_fifoin;
  localparam int W = 133, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  logic wr_en = 0, wr_full, rd_valid, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] rd_used;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  fifoin #(.WIDTH(W), .DEPTH(D)) dut (.wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full,
                                     .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid, .rd_data, .rd_ready, .rd_used);

  // reset: give the asynchronous reset a falling edge at the start
  initial begin
    #1;
    wrst_n = 0;
    rrst_n = 0;
  end

  always #4 wclk = ~wclk;
  always #5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] rnd();
    return {5'($urandom), $urandom, $urandom, $urandom, $urandom};
  endfunction

  // reader: compare against the model queue
  always @(posedge rclk) if (rrst_n && rd_valid && rd_ready) begin
    check(q.size() > 0, "read from empty model");
    if (q.size() > 0) begin
      logic [W-1:0] e;
      e = q.pop_front();
      check(rd_data == e, $sformatf("data %h want %h", rd_data, e));
    end
  end

  initial begin
    int n;
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    // 1) fill with no reads: full after D blocks
    n = 0;
    while (!wr_full && n < D + 5) begin
      @(negedge wclk); wr_en = 1; wr_data = rnd(); q.push_back(wr_data); n++;
      @(posedge wclk); #1;
    end
    @(negedge wclk); wr_en = 0;
    check(n == D + 1, $sformatf("full after %0d writes, want %0d", n, D + 1));
    // write while full is ignored
    @(negedge wclk); wr_en = 1; wr_data = '1;
    @(negedge wclk); wr_en = 0;
    repeat (6) @(posedge rclk); #1;
    check(rd_used == D + 1, $sformatf("rd_used %0d want %0d", rd_used, D + 1));
    // 2) drain with ready held: one block per read clock
    @(negedge rclk); rd_ready = 1;
    n = 0;
    repeat (D + 1) begin if (rd_valid) n++; @(posedge rclk); #1; end
    check(n == D + 1, $sformatf("drained %0d of %0d in %0d cycles", n, D + 1, D + 1));
    repeat (4) @(posedge rclk);
    check(!rd_valid && q.size() == 0 && rd_used == 0, "empty after drain");
    // 3) random traffic on both sides
    fork
      begin
        for (int i = 0; i < 600; i++) begin
          @(negedge wclk);
          wr_en = 0;
          if ($urandom_range(0, 2) != 0 && !wr_full) begin
            wr_en = 1; wr_data = rnd(); q.push_back(wr_data);
          end
        end
        @(negedge wclk) wr_en = 0;
      end
      begin
        for (int i = 0; i < 900; i++) begin
          @(negedge rclk); rd_ready = ($urandom_range(0, 2) != 0);
        end
        rd_ready = 1;
      end
    join
    repeat (40) @(posedge rclk);
    check(q.size() == 0, $sformatf("%0d blocks never came out", q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
