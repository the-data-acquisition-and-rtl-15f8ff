// tb_stc_fanout_card -- STC Fanout Card, two cards chained for the inward
// AND. Checks: each of the six outward signals reaches all five cable ports
// and the NIM outputs, disabled or delayed by the programmed 0..15 clocks;
// the afterrun holds PEn's true->false transition back by the programmed
// number of clocks while leaving its rising edge alone; the artificial PEn
// replaces PEn by a pulse of the programmed number of bunch crossings,
// started by the NIM input or the register bit and aligned to the bunch
// crossing; the gated clock is the HERA clock only while PEn is high; the
// inward signals appear on the backplane and in a register, and the masked
// AND spans both cards.
module tb_stc_fanout_card;
  logic clk = 0, rst = 1, bc;
  logic [1:0] ph;
  logic [5:0] out;
  logic nim;
  logic [1:0][4:0][1:0] inward;
  logic we [2];
  logic [2:0] addr [2];
  logic [31:0] wdata [2], rdata [2];
  logic [1:0][4:0][5:0] port;
  logic [1:0][5:0] nim_o;
  logic [1:0] gclk, and_o;
  logic [1:0][9:0] in_o;
  logic [5:0] hist [$];
  int dly [6];
  logic [5:0] en;
  int ar_len;
  int checks = 0, failures = 0;
  bit checking = 0;

  for (genvar c = 0; c < 2; c++) begin : g_card
    stc_fanout_card dut (.clk, .rst, .bc_i(bc), .out_i(out), .nim_i(c == 0 ? nim : 1'b0),
      .inward_i(inward[c]), .and_i(c == 0 ? and_o[1] : 1'b1),
      .reg_we_i(we[c]), .reg_addr_i(addr[c]), .reg_wdata_i(wdata[c]), .reg_rdata_o(rdata[c]),
      .port_o(port[c]), .nim_o(nim_o[c]), .gclk_o(gclk[c]), .inward_o(in_o[c]), .and_o(and_o[c]));
  end
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) ph <= '0;
    else     ph <= ph + 2'd1;
  end
  assign bc = (ph == 2'd3);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: delay line per signal, afterrun on signal 1
  always @(negedge clk) begin
    if (!rst) begin
      hist.push_front(out);
      if (hist.size() > 40) void'(hist.pop_back());
      if (checking) begin
        logic [5:0] e;
        for (int s = 0; s < 6; s++) e[s] = hist[dly[s]][s] & en[s];
        // afterrun: high if the delayed PEn was high within the last ar_len clocks
        e[1] = 0;
        for (int k = 0; k <= ar_len; k++) e[1] |= hist[dly[1] + k][1];
        e[1] &= en[1];
        for (int p = 0; p < 5; p++) begin
          checks++;
          if (port[0][p] != e) begin
            failures++;
            if (failures < 10) $display("port %0d: %b expected %b", p, port[0][p], e);
          end
        end
        checks++;
        if (nim_o[0] != e || gclk[0] != (e[0] & e[1])) begin failures++; $display("NIM / gated clock wrong"); end
      end
    end
  end

  task automatic wr(input int c, input logic [2:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    we[c] = 1; addr[c] = a; wdata[c] = d;
    @(posedge clk); #1;
    we[c] = 0;
  endtask

  task automatic random_run(input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      out[0] = (ph < 2'd2);             // HERA clock
      if ($urandom_range(0, 9) == 0) out[1] = ~out[1];
      out[5:2] = 4'($urandom);
    end
  endtask

  initial begin
    logic [31:0] d;
    out = 0; nim = 0; inward = '0;
    for (int c = 0; c < 2; c++) begin we[c] = 0; addr[c] = 0; wdata[c] = 0; end
    for (int s = 0; s < 6; s++) dly[s] = 0;
    en = 6'h3F; ar_len = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    random_run(40);
    checking = 1;
    random_run(200);
    for (int round = 0; round < 4; round++) begin
      logic [23:0] dw;
      checking = 0;
      for (int s = 0; s < 6; s++) begin dly[s] = $urandom_range(0, 15); dw[4*s +: 4] = 4'(dly[s]); end
      en = (round == 3) ? 6'h3F : 6'($urandom) | 6'h02;
      ar_len = (round == 0) ? 0 : $urandom_range(1, 12);
      wr(0, 3'd1, 32'(dw));
      wr(0, 3'd0, 32'(en));
      wr(0, 3'd2, 32'(ar_len));
      random_run(40);
      checking = 1;
      random_run(300);
    end
    checking = 0;
    // artificial PEn: 3 crossings, started by NIM and by the register bit
    out = 0;
    wr(0, 3'd1, 32'h0);
    wr(0, 3'd2, 32'h0);
    wr(0, 3'd3, 32'd3);
    wr(0, 3'd0, 32'h13F);
    for (int t = 0; t < 2; t++) begin
      int n_hi, first;
      repeat (5) @(posedge clk); #1;
      if (t == 0) begin nim = 1; @(posedge clk); #1; nim = 0; end
      else wr(0, 3'd0, 32'h33F);
      n_hi = 0; first = -1;
      for (int i = 0; i < 40; i++) begin
        @(posedge clk); #1;
        if (port[0][2][1]) begin
          n_hi++;
          if (first < 0) first = i;
        end
      end
      checks++;
      if (n_hi != 12) begin failures++; $display("artificial PEn lasted %0d clocks", n_hi); end
      checks++;
      if (first < 0) begin failures++; $display("artificial PEn never started"); end
    end
    // the artificial pulse starts on a bunch-crossing boundary
    begin
      int ph_at_rise;
      ph_at_rise = -1;
      wr(0, 3'd0, 32'h33F);
      for (int i = 0; i < 20; i++) begin
        @(posedge clk); #1;
        if (port[0][0][1] && ph_at_rise < 0) ph_at_rise = int'(ph);
      end
      checks++;
      if (ph_at_rise != 0) begin failures++; $display("artificial PEn starts in phase %0d", ph_at_rise); end
    end
    wr(0, 3'd0, 32'h03F);
    // inward signals and the chained AND
    wr(0, 3'd4, 32'h3FF);
    wr(1, 3'd4, 32'h00F);
    inward[0] = '1; inward[1] = 10'h00F;
    #1;
    checks++; if (and_o[0] != 1'b1) begin failures++; $display("AND false with all inputs true"); end
    inward[1][4] = 2'b00;                     // masked on card 1
    #1;
    checks++; if (and_o[0] != 1'b1) begin failures++; $display("masked input counted"); end
    inward[1][1][0] = 1'b0;                   // used on card 1
    #1;
    checks++; if (and_o[0] != 1'b0) begin failures++; $display("AND not chained"); end
    inward[1] = 10'h00F;
    inward[0][3][1] = 1'b0;
    #1;
    checks++; if (and_o[0] != 1'b0) begin failures++; $display("AND ignores card 0"); end
    checks++; if (in_o[0] != 10'h37F) begin failures++; $display("inward backplane %h", in_o[0]); end
    addr[0] = 3'd5; #1;
    checks++; if (rdata[0] != 32'h37F) begin failures++; $display("inward register %h", rdata[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
