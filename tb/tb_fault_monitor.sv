// tb_fault_monitor: drives the Fault Monitor over its UART and checks the
// status vectors it returns and logs.
//
// The payload is a testbench model that answers each vector with the
// expected ciphertext after a fixed delay and can be told to corrupt one
// branch, two branches and all outputs, one output copy, or to stay silent
// for one vector.  The test checks each error class of the status vector,
// the pass counter, the scrubber-busy flag, the log read-back ('R'), log
// clearing ('C') and continuous testing with log-on-change ('G'/'H').
`timescale 1ns/1ps
module tb_fault_monitor;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  logic pl_start, pl_done, scrub_busy = 0, testing;
  logic [127:0] pl_key, pl_pt;
  logic [2:0][127:0] pl_out_ct, pl_branch_ct;
  logic [383:0] vec [64];
  int checks = 0, failures = 0;

  fault_monitor #(.CLKS_PER_BIT(CPB), .LOG_DEPTH(16)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd),
    .pl_start, .pl_key, .pl_pt, .pl_done, .pl_out_ct, .pl_branch_ct,
    .scrub_busy, .testing);

  always #5 clk = ~clk;

  // ---- payload model
  typedef enum {E_NONE, E_SINGLE, E_BRIDGE, E_VOTER, E_SILENT} err_e;
  err_e err_mode = E_NONE;
  int   err_vec  = 5;
  int   delay    = 0;
  logic [127:0] exp_ct;
  logic busy_m = 0;
  always @(posedge clk) begin
    pl_done <= 0;
    if (pl_start) begin
      busy_m <= 1; delay <= 10;
      exp_ct <= '0;
      for (int i = 0; i < 64; i++)
        if (vec[i][383:256] == pl_key && vec[i][255:128] == pl_pt) exp_ct <= vec[i][127:0];
    end else if (busy_m) begin
      if (delay == 0) begin
        busy_m <= 0;
        pl_out_ct    <= {3{exp_ct}};
        pl_branch_ct <= {3{exp_ct}};
        if (vec[err_vec][255:128] == pl_pt && vec[err_vec][383:256] == pl_key) begin
          case (err_mode)
            E_SINGLE: pl_branch_ct[1] <= ~exp_ct;
            E_BRIDGE: begin pl_branch_ct[0] <= ~exp_ct; pl_branch_ct[2] <= ~exp_ct;
                            pl_out_ct <= {3{~exp_ct}}; end
            E_VOTER:  pl_out_ct[2] <= ~exp_ct;
            default: ;
          endcase
        end
        if (!(err_mode == E_SILENT && vec[err_vec][255:128] == pl_pt &&
              vec[err_vec][383:256] == pl_key))
          pl_done <= 1;
      end else delay <= delay - 1;
    end
  end

  // ---- UART host side
  byte rxq[$];
  task automatic send(input byte b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  initial begin
    byte b;
    forever begin
      @(negedge txd);
      repeat (CPB + CPB/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (CPB) @(posedge clk); end
      rxq.push_back(b);
    end
  end
  task automatic get_bytes(input int n, output logic [63:0] v);
    int guard = 0;
    v = '0;
    while (rxq.size() < n && guard < 200000) begin @(posedge clk); guard++; end
    for (int i = 0; i < n; i++) if (rxq.size() > 0) v = {v[55:0], rxq.pop_front()};
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [63:0] sv [6];
  task automatic iso(input int idx, input err_e m, input logic [63:0] exp_low32,
                     input logic busy_during);
    logic [63:0] s;
    err_mode = m;
    fork
      send("T");
      if (busy_during) begin
        wait (testing); repeat (50) @(posedge clk); scrub_busy = 1;
        repeat (5) @(posedge clk); scrub_busy = 0;
      end
    join
    get_bytes(8, s);
    sv[idx] = s;
    check(s[63:32] == 32'(idx), $sformatf("pass number %0d got %0d", idx, s[63:32]));
    check(s[31:0] == exp_low32[31:0], $sformatf("status %0d: got %h exp %h", idx, s[31:0], exp_low32[31:0]));
    err_mode = E_NONE;
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    $readmemh("rtl/aes_kat_vectors.hex", vec);
    pl_out_ct = '0; pl_branch_ct = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    //             fails first br  out  f b     flags
    iso(0, E_NONE,   {32'h0, 8'd0, 8'hFF, 3'b000, 3'b000, 1'b0, 1'b0, 8'h00}, 0);
    iso(1, E_SINGLE, {32'h0, 8'd0, 8'hFF, 3'b010, 3'b000, 1'b0, 1'b0, 8'h01}, 0);
    iso(2, E_BRIDGE, {32'h0, 8'd1, 8'd5,  3'b101, 3'b111, 1'b1, 1'b0, 8'h02}, 0);
    iso(3, E_VOTER,  {32'h0, 8'd0, 8'hFF, 3'b000, 3'b100, 1'b0, 1'b0, 8'h04}, 0);
    iso(4, E_SILENT, {32'h0, 8'd1, 8'd5,  3'b111, 3'b111, 1'b1, 1'b0, 8'h08}, 0);
    iso(5, E_NONE,   {32'h0, 8'd0, 8'hFF, 3'b000, 3'b000, 1'b0, 1'b1, 8'h00}, 1);
    // read the log back
    send("R");
    get_bytes(2, v);
    check(v[15:0] == 16'd6, $sformatf("log count %0d", v[15:0]));
    for (int i = 0; i < 6; i++) begin
      get_bytes(8, v);
      check(v == sv[i], $sformatf("log entry %0d", i));
    end
    send("C");
    send("R");
    get_bytes(2, v);
    check(v[15:0] == 16'd0, "log cleared");
    // continuous test: clean, then errors, then clean again, then halt
    send("G");
    repeat (3000) @(posedge clk);
    err_mode = E_SINGLE;
    repeat (2500) @(posedge clk);
    err_mode = E_NONE;
    repeat (2500) @(posedge clk);
    send("H");
    get_bytes(8, v);                       // status of the last pass
    check(v[15:0] == 16'h0, "last continuous pass clean");
    check(v[63:32] > 32'd10, $sformatf("continuous passes %0d", v[63:32]));
    send("R");
    get_bytes(2, v);
    check(v[15:0] == 16'd3, $sformatf("continuous log count %0d", v[15:0]));
    get_bytes(8, v);
    check(v[15:0] == 16'h4001, $sformatf("first change entry %h", v[15:0]));
    get_bytes(8, v);
    check(v[15:0] == 16'h0000, "recovery entry");
    get_bytes(8, v);
    check(v[15:0] == 16'h0000, "halt entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
