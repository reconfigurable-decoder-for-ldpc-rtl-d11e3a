// msg_mem_tb: random reads, writes and loads of the message memory against
// a behavioural copy, including the load bypass of the read ports and the
// priority of a write over a load.
module msg_mem_tb;
  localparam int WORDS = 32;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [6:0] init_l [WORDS], init_r [WORDS], wd_l [WORDS], wd_r [WORDS];
  logic signed [6:0] rd_l [WORDS], rd_r [WORDS];
  logic [WORDS-1:0] we_l = '0, we_r = '0;
  logic signed [6:0] mdl_l [WORDS], mdl_r [WORDS];
  int checks = 0, failures = 0, loads = 0, bypass_seen = 0;

  msg_mem #(.W(7), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      init_l[w] = '0; init_r[w] = '0; wd_l[w] = '0; wd_r[w] = '0;
      mdl_l[w] = '0; mdl_r[w] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      chk("reset L", rd_l[w], 0);
      chk("reset R", rd_r[w], 0);
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load = ($urandom_range(4) == 0);
      we_l = {$urandom(), $urandom()} ;
      we_r = $urandom();
      for (int w = 0; w < WORDS; w++) begin
        init_l[w] = 7'($urandom_range(126) - 63);
        init_r[w] = 7'($urandom_range(126) - 63);
        wd_l[w]   = 7'($urandom_range(126) - 63);
        wd_r[w]   = 7'($urandom_range(126) - 63);
      end
      #1;
      for (int w = 0; w < WORDS; w++) begin
        chk("read L", rd_l[w], load ? init_l[w] : mdl_l[w]);
        chk("read R", rd_r[w], load ? init_r[w] : mdl_r[w]);
      end
      if (load) begin loads++; bypass_seen++; end
      for (int w = 0; w < WORDS; w++) begin
        if (we_l[w]) mdl_l[w] = wd_l[w]; else if (load) mdl_l[w] = init_l[w];
        if (we_r[w]) mdl_r[w] = wd_r[w]; else if (load) mdl_r[w] = init_r[w];
      end
    end
    @(negedge clk);
    load = 0; we_l = '0; we_r = '0;
    #1;
    for (int w = 0; w < WORDS; w++) begin
      chk("final L", rd_l[w], mdl_l[w]);
      chk("final R", rd_r[w], mdl_r[w]);
    end
    checks++;
    if (loads == 0 || bypass_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
