// tb_amba_control: drives the APB slave with two-cycle read and write
// transfers and emulates the datapath side of both handshakes on a second,
// faster clock. It checks register write/read-back (reserved bits zero), the
// STATE field through RESET, IDLE, RECONF and RUNNING, the order and content
// of the four configuration words, the automatic clearing of RECONF, the
// return to RUNNING after a reconfiguration with START still set, result
// retrieval with DATA_RDY set and cleared by reading, a result being held
// back while not running, overwriting of an unread result, and soft reset.
module tb_amba_control;
  import pd_pkg::*;
  localparam int RESET_CYCLES = 8;
  logic        pclk = 1'b0, dclk = 1'b0, presetn;
  logic        psel, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic        soft_reset, start, cfg_req, cfg_ack, res_valid, res_ack;
  logic [31:0] cfg_data, res_data;
  logic [31:0] got_words [$];
  int checks = 0, failures = 0;

  amba_control #(.RESET_CYCLES(RESET_CYCLES)) dut (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .soft_reset, .start, .cfg_req, .cfg_data, .cfg_ack, .res_valid, .res_data, .res_ack
  );

  always #12.5 pclk = ~pclk;   // 40 MHz bus clock
  always #5    dclk = ~dclk;   // 100 MHz datapath clock

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apb_write(input logic [2:0] idx, input logic [31:0] d);
    @(posedge pclk); #1;
    psel = 1'b1; pwrite = 1'b1; paddr = {27'd0, idx, 2'b00}; pwdata = d;
    @(posedge pclk); #1;
    penable = 1'b1;
    @(posedge pclk); #1;
    psel = 1'b0; penable = 1'b0;
  endtask

  task automatic apb_read(input logic [2:0] idx, output logic [31:0] d);
    @(posedge pclk); #1;
    psel = 1'b1; pwrite = 1'b0; paddr = {27'd0, idx, 2'b00};
    @(posedge pclk); #1;
    penable = 1'b1;
    @(posedge pclk);
    d = prdata;                 // sampled at the end of the access phase
    #1 psel = 1'b0; penable = 1'b0;
  endtask

  function automatic logic [1:0] st(input logic [31:0] ctrl);
    return ctrl[4:3];
  endfunction

  task automatic wait_state(input ctrl_state_t s, input string what);
    logic [31:0] c;
    int n = 0;
    do begin apb_read(REG_CTRL, c); n++; end while (st(c) != s && n < 200);
    check(32'(st(c)), 32'(s), what);
  endtask

  // datapath side: configuration receiver
  initial begin
    cfg_ack = 1'b0;
    forever begin
      @(posedge dclk iff cfg_req);
      repeat (2) @(posedge dclk);
      got_words.push_back(cfg_data);
      cfg_ack = 1'b1;
      @(posedge dclk iff !cfg_req);
      repeat (2) @(posedge dclk);
      cfg_ack = 1'b0;
    end
  end

  // datapath side: result sender
  task automatic offer(input logic [31:0] r);
    @(posedge dclk);
    res_data = r;
    res_valid = 1'b1;
    @(posedge dclk iff res_ack);
    repeat (2) @(posedge dclk);
    res_valid = 1'b0;
    @(posedge dclk iff !res_ack);
    repeat (2) @(posedge dclk);
  endtask

  logic [31:0] c, r;
  initial begin
    presetn = 1'b0; psel = 1'b0; penable = 1'b0; pwrite = 1'b0; paddr = '0; pwdata = '0;
    res_valid = 1'b0; res_data = '0;
    repeat (3) @(posedge pclk);
    check(32'(soft_reset), 1, "soft reset during bus reset");
    #1 presetn = 1'b1;
    apb_read(REG_CTRL, c);
    check(32'(st(c)), 32'(CS_RESET), "state after reset");
    wait_state(CS_IDLE, "idle after reset");
    check(32'(soft_reset), 0, "soft reset released");

    // configuration registers
    apb_write(REG_SLOW_CFG, 32'hE682_64FF);
    apb_write(REG_FAST_CFG, 32'h8250_32AA);
    apb_write(REG_SLOW_THR, 32'h0800_0400);
    apb_write(REG_FAST_THR, 32'h0400_0200);
    apb_read(REG_SLOW_CFG, r); check(r, 32'hE682_6400, "slow cfg readback");
    apb_read(REG_FAST_CFG, r); check(r, 32'h8250_3200, "fast cfg readback");
    apb_read(REG_SLOW_THR, r); check(r, 32'h0800_0400, "slow thr readback");
    apb_read(REG_FAST_THR, r); check(r, 32'h0400_0200, "fast thr readback");
    apb_read(3'd6, r);         check(r, 32'h0, "unused word");

    // reconfiguration from idle
    apb_write(REG_CTRL, 32'h4);
    apb_read(REG_CTRL, c);
    check(32'(st(c)), 32'(CS_RECONF), "state during reconf");
    check(32'(c[CTRL_RECONF]), 1, "RECONF set");
    check(32'(start), 0, "start low during reconf");
    wait_state(CS_IDLE, "idle after reconf");
    apb_read(REG_CTRL, c);
    check(32'(c[CTRL_RECONF]), 0, "RECONF self-clears");
    check(32'(got_words.size()), 4, "four words sent");
    if (got_words.size() == 4) begin
      check(got_words[0], 32'hE682_6400, "word 0");
      check(got_words[1], 32'h8250_3200, "word 1");
      check(got_words[2], 32'h0800_0400, "word 2");
      check(got_words[3], 32'h0400_0200, "word 3");
    end
    got_words.delete();

    // a result offered while idle is not taken
    fork offer(32'h1234_0567); join_none
    repeat (20) @(posedge pclk);
    apb_read(REG_CTRL, c);
    check(32'(c[CTRL_DATA_RDY]), 0, "no result taken while idle");

    // start: RUNNING, pending result now taken
    apb_write(REG_CTRL, 32'h2);
    wait_state(CS_RUNNING, "running");
    check(32'(start), 1, "start line");
    repeat (20) @(posedge pclk);
    apb_read(REG_CTRL, c);
    check(32'(c[CTRL_DATA_RDY]), 1, "DATA_RDY set");
    apb_read(REG_RESULT, r);
    check(r, 32'h1234_0567, "result");
    apb_read(REG_CTRL, c);
    check(32'(c[CTRL_DATA_RDY]), 0, "DATA_RDY cleared by reading");

    // two results without reading: the newer one overwrites
    offer(32'h0AAA_0BBB);
    offer(32'h0CCC_0DDD);
    repeat (10) @(posedge pclk);
    apb_read(REG_CTRL, c);
    check(32'(c[CTRL_DATA_RDY]), 1, "DATA_RDY after two results");
    apb_read(REG_RESULT, r);
    check(r, 32'h0CCC_0DDD, "newest result kept");

    // reconfiguration while running resumes running
    apb_write(REG_SLOW_THR, 32'h0900_0500);
    apb_write(REG_CTRL, 32'h6);
    wait_state(CS_RECONF, "reconf from running");
    wait_state(CS_RUNNING, "running again after reconf");
    check(32'(got_words.size()), 4, "four words sent again");
    if (got_words.size() == 4) check(got_words[2], 32'h0900_0500, "new threshold word");

    // stop
    apb_write(REG_CTRL, 32'h0);
    wait_state(CS_IDLE, "idle after stop");
    check(32'(start), 0, "start line low after stop");

    // soft reset from running
    apb_write(REG_CTRL, 32'h2);
    wait_state(CS_RUNNING, "running before soft reset");
    apb_write(REG_CTRL, 32'h3);
    apb_read(REG_CTRL, c);
    check(32'(st(c)), 32'(CS_RESET), "soft reset state");
    check(32'(soft_reset), 1, "soft reset line");
    wait_state(CS_IDLE, "idle after soft reset");
    apb_read(REG_CTRL, c);
    check(c, 32'h0000_0008, "control after soft reset");
    apb_read(REG_SLOW_THR, r);
    check(r, 32'h0900_0500, "registers kept over soft reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
