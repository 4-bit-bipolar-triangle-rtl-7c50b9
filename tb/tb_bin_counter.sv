// Testbench of the skipping binary counter. After reset it must hold 15;
// increments must then visit 1..7, 9..15 and repeat (14 states), with
// skip flagged on the steps 7 -> 9 and 15 -> 1 and wrap on 15 -> 1 only.
// Increments come at random intervals.
module tb_bin_counter;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       inc = 1'b0;
  logic [3:0] cnt;
  logic       wrap;
  logic       skip;
  int         checks = 0;
  int         failures = 0;
  int         expect_cnt;
  int         nwrap = 0;
  int         nskip = 0;

  bin_counter dut (.clk(clk), .rst_n(rst_n), .inc_i(inc), .cnt_o(cnt),
                   .wrap_o(wrap), .skip_o(skip));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    expect_cnt = 15;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      inc = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (cnt !== 4'(expect_cnt)) begin
        failures++;
        $display("cycle %0d: count %0d expected %0d", n, cnt, expect_cnt);
      end
      checks++;
      if (skip !== (inc && (expect_cnt == 7 || expect_cnt == 15))
          || wrap !== (inc && expect_cnt == 15)) begin
        failures++;
        $display("cycle %0d: skip=%0b wrap=%0b at count %0d", n, skip, wrap, expect_cnt);
      end
      if (inc) begin
        nxt = (expect_cnt == 15) ? 1 : (expect_cnt == 7) ? 9 : expect_cnt + 1;
        if (expect_cnt == 15) nwrap++;
        if (expect_cnt == 7 || expect_cnt == 15) nskip++;
        expect_cnt = nxt;
      end
    end
    checks++;
    if (nwrap < 10 || nskip < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
