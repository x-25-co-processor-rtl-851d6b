// tb_ll2_tx_manager: checks the transmit manager together with the pattern
// generator it drives (FCS generator and zero inserter left out, so the
// manager's data goes straight to the line).
// Scenario: flags (ready after the first flag); a frame of 16 field bits
// and 3 octets from level 3, with FRAME END given during the last octet;
// an FRMR frame (40 field bits, no data); an abort during a frame; idle.
// For each frame the line must show flag, the field bits from the field
// register, the level 3 octets, a 16 bit FCS slot (fcs_calc low), and the
// closing flag; preload must pulse at the start of every frame, FRAME END
// must be acknowledged once, and ready must rise after the closing flag.
`timescale 1ns/1ps
module tb_ll2_tx_manager;
  import x25_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cmd = 4'b1010;
  logic cmd_wr = 1'b0, frame_end = 1'b0, soft_reset = 1'b0;
  logic frame_end_ack, stb_line = 1'b0, stb, pat_done, fcs_preload, fcs_calc;
  logic field_shift, field_bit, l3_txd, l3_stb, dout, ready, in_frame;
  pattern_e pat_cur, pat_req;
  logic line_bit, mux1;
  always #5 clk = ~clk;

  ll2_pattern_gen u_pat (.clk, .rst_n, .stb(stb_line), .req(pat_req), .din(dout),
                         .dout(line_bit), .up_stb(stb), .mux1, .done(pat_done), .cur(pat_cur));
  ll2_tx_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // field register and level 3 data models
  logic [39:0] field = '0;
  assign field_bit = field[39];
  logic [7:0] data[$];
  int didx = 0;
  assign l3_txd = (didx / 8 < data.size()) ? data[didx / 8][7 - didx % 8] : 1'b0;
  int n_ack = 0, n_pre = 0;
  bit q_line[$], q_calc[$], q_mux[$];
  always @(posedge clk) begin
    if (field_shift) field <= {field[38:0], 1'b0};
    if (l3_stb) begin
      didx <= didx + 1;
      if (didx + 1 == (data.size() - 1) * 8 + 1) frame_end <= 1'b1;
    end
    if (frame_end_ack) begin n_ack++; frame_end <= 1'b0; end
    if (fcs_preload) n_pre++;
    if (stb_line) begin
      q_line.push_back(line_bit); q_calc.push_back(fcs_calc); q_mux.push_back(mux1);
    end
  end
  always begin
    repeat (3) @(posedge clk);
    stb_line <= 1'b1;
    @(posedge clk) stb_line <= 1'b0;
  end

  function automatic bit all_ones(input int from, input int n);
    if (from < 0 || from + n > q_line.size()) return 1'b0;
    for (int k = 0; k < n; k++) if (!q_line[from + k]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic command(input logic [3:0] c);
    @(posedge clk) begin cmd <= c; cmd_wr <= 1'b1; end
    @(posedge clk) cmd_wr <= 1'b0;
    #1;
  endtask
  task automatic wait_ready();
    int n = 0;
    @(posedge clk);
    while (!ready && n < 20000) begin @(posedge clk); n++; end
    check(ready, "ready rises");
  endtask

  // checks the frame that starts at the first non-pattern strobe at or after from
  task automatic check_frame(input int from, input int nfield, input logic [39:0] f,
                             input int ndata, input string what);
    int i = from;
    bit ok = 1'b1;
    while (i < q_mux.size() && q_mux[i]) i++;
    for (int k = 0; k < 8; k++) if (q_line[i - 8 + k] != FLAG_PAT[7 - k]) ok = 1'b0;
    check(ok, {what, ": leading flag"});
    ok = 1'b1;
    for (int k = 0; k < nfield; k++) if (q_line[i + k] != f[39 - k] || q_mux[i + k]) ok = 1'b0;
    check(ok, {what, ": field bits"});
    ok = 1'b1;
    for (int k = 0; k < ndata * 8; k++)
      if (q_line[i + nfield + k] != data[k / 8][7 - k % 8] || !q_calc[i + nfield + k]) ok = 1'b0;
    check(ok, {what, ": level 3 data"});
    ok = 1'b1;
    for (int k = 0; k < 16; k++) if (q_calc[i + nfield + ndata * 8 + k] || q_mux[i + nfield + ndata * 8 + k]) ok = 1'b0;
    check(ok && q_calc[i + nfield + ndata * 8 + 16], {what, ": 16 bit FCS slot"});
    ok = 1'b1;
    for (int k = 0; k < 8; k++) if (q_line[i + nfield + ndata * 8 + 16 + k] != FLAG_PAT[7 - k]) ok = 1'b0;
    check(ok, {what, ": closing flag"});
  endtask

  initial begin
    int mark;
    logic [39:0] f1, f2;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (200) @(posedge clk);
    check(q_line.size() > 20 && all_ones(q_line.size() - 14, 14), "idle after reset");
    command(4'b1000);
    wait_ready();
    // frame with data
    f1 = {16'($urandom), 24'd0};
    field = f1;
    data = '{8'($urandom), 8'hFF, 8'($urandom)};
    didx = 0;
    mark = q_line.size();
    command(4'b0000);
    check(!ready, "ready drops on a command");
    wait_ready();
    check_frame(mark, 16, f1, 3, "frame");
    check(n_ack == 1 && n_pre == 1, $sformatf("frame end acknowledged (%0d), FCS preset (%0d)", n_ack, n_pre));
    // FRMR frame: 40 field bits, frame end given at once
    f2 = {8'($urandom), 32'($urandom)};
    field = f2;
    data.delete();
    frame_end <= 1'b1;
    mark = q_line.size();
    command(4'b0001);
    wait_ready();
    check_frame(mark, 40, f2, 0, "FRMR frame");
    check(n_ack == 2 && n_pre == 2, "FRMR frame end acknowledged");
    // abort in a frame
    field = '0;
    data = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    didx = 0;
    command(4'b0000);
    while (!in_frame) @(posedge clk);
    repeat (100) @(posedge clk);
    mark = q_line.size();
    command(4'b0100);
    wait_ready();
    repeat (50) @(posedge clk);
    begin
      automatic int i = mark;
      while (i < q_line.size() && !q_line[i]) i++;
      check(i + 8 <= q_line.size() && all_ones(i, 7) && q_line[i + 7] == 1'b0,
            "seven ones after the abort command");
    end
    check(!in_frame, "frame left after abort");
    // idle
    command(4'b0010);
    repeat (400) @(posedge clk);
    check(all_ones(q_line.size() - 30, 30), "idle: ones on the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
