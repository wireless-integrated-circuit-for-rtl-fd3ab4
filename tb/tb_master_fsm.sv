// tb_master_fsm: sends command frames bit by bit (start bit 1, 7-bit
// address, 2-bit register, 9-bit value, MSB first) and plays the addressed
// site, acknowledging each request after a random delay. Checks that every
// valid frame gives exactly one write with the right fields, that the
// request is held until the acknowledge and that the master waits for the
// acknowledge to drop; that a frame addressing a site beyond the array is
// dropped with cmd_error; and that bits arriving during a write are ignored.
module tb_master_fsm;
  import inis1_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_bit = 1'b0, cmd_strobe = 1'b0;
  logic wr_req, wr_ack = 1'b0, busy, cmd_error, cmd_done;
  logic [6:0] wr_addr;
  reg_sel_e wr_reg;
  logic [8:0] wr_data;
  int checks = 0, failures = 0;
  int n_writes = 0, n_err = 0, n_done = 0, n_ignored = 0;
  int e_addr, e_reg, e_data;

  master_fsm dut (.clk, .rst_n, .cmd_bit, .cmd_strobe, .wr_req, .wr_addr, .wr_reg,
                  .wr_data, .wr_ack, .busy, .cmd_error, .cmd_done);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // site model: acknowledge after 1..3 clocks, drop after the request drops
  initial begin
    wait (rst_n);
    forever begin
      do @(posedge clk); while (!wr_req);
      n_writes++;
      checks++;
      if (int'(wr_addr) != e_addr || int'(wr_reg) != e_reg || int'(wr_data) != e_data)
        fail($sformatf("write %0d/%0d/%0d want %0d/%0d/%0d", wr_addr, wr_reg, wr_data, e_addr, e_reg, e_data));
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk);
        checks++;
        if (!wr_req) fail("request dropped before the acknowledge");
      end
      wr_ack <= 1'b1;
      do @(posedge clk); while (wr_req);
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk);
        checks++;
        if (wr_req || !busy) fail("master moved on before the acknowledge dropped");
      end
      wr_ack <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (cmd_error) n_err++;
    if (cmd_done) n_done++;
  end

  task automatic send_bit(input logic b, input int gap);
    @(negedge clk);
    cmd_bit = b; cmd_strobe = 1'b1;
    @(negedge clk);
    cmd_strobe = 1'b0; cmd_bit = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic send_frame(input int a, r, d, gap);
    logic [17:0] w;
    w = {7'(a), 2'(r), 9'(d)};
    send_bit(1'b1, gap);
    for (int i = 17; i >= 0; i--) send_bit(w[i], gap);
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    int w0, e0, d0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    idle(3);
    // random valid frames
    for (int k = 0; k < 60; k++) begin
      e_addr = $urandom_range(0, 99); e_reg = $urandom_range(0, 3); e_data = $urandom_range(0, 511);
      w0 = n_writes; d0 = n_done;
      send_frame(e_addr, e_reg, e_data, $urandom_range(0, 3));
      idle(12);
      checks++;
      if (n_writes != w0 + 1 || n_done != d0 + 1) fail($sformatf("frame gave %0d writes, %0d done", n_writes - w0, n_done - d0));
    end
    // out-of-range addresses
    for (int k = 0; k < 5; k++) begin
      w0 = n_writes; e0 = n_err;
      send_frame(100 + k * 5, 1, 33, 1);
      idle(12);
      checks++;
      if (n_writes != w0 || n_err != e0 + 1) fail("bad address not dropped");
    end
    // bits while busy are ignored
    e_addr = 42; e_reg = 2; e_data = 300;
    w0 = n_writes;
    send_frame(e_addr, e_reg, e_data, 0);
    @(negedge clk);
    checks++;
    if (!busy) fail("not busy during a write");
    while (busy) begin
      cmd_bit = 1'b1; cmd_strobe = 1'b1;
      @(negedge clk);
      n_ignored++;
    end
    cmd_bit = 1'b0; cmd_strobe = 1'b0;
    idle(40);
    checks++;
    if (n_writes != w0 + 1) fail("bits during a write started a frame");
    checks++;
    if (n_ignored == 0) fail("no bits were sent during a write");
    $display("writes=%0d errors=%0d ignored_bits=%0d", n_writes, n_err, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
