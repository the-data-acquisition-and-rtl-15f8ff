// tb_stc_fast_card -- STC Fast Card. The bench counts bunch crossings and
// records when each backplane signal changes. Checks:
//  * modes 0 and 1 pass the CTC's fast signals through unchanged;
//  * mode 3, forced L2 reject: a detector trigger sets its L1 flip-flop,
//    L1 Keep rises and PEn / L1 Active drop, the L2 decision comes the
//    programmed number of crossings later, Fast Clear lasts one crossing,
//    PEn returns one crossing after Fast Clear and L1 Active 145 crossings
//    after it;
//  * mode 3, L2 keep: L2 Keep rises, the FER flip-flop drops and returns
//    after the programmed FER delay, its pulse starts the restart;
//  * external FER, the down-scaler of detector trigger 1, the test trigger
//    (input pulse and bus bit), mode 2 (L1 Keep from the CTC), the L2
//    decider input, mode 4 oscillator select, and the scalers.
module tb_stc_fast_card;
  import cip_pkg::*;
  logic clk = 0, rst = 1, bc;
  logic [1:0] ph;
  logic c_pen, c_atv, c_l1kp, c_l2kp, c_fsclr, c_frsbu, c_fillbu, c_run;
  logic [1:0] det;
  logic test, dec, fer_ext;
  logic we;
  logic [3:0] addr;
  logic [31:0] wdata, rdata;
  logic pen, atv, l1kp, l2kp, fsclr, frsbu, fillbu, run, fer, ferp, clkl;
  logic [2:0] l1ff;
  int bcn = 0;
  int checks = 0, failures = 0;
  // crossing numbers of the last changes
  int t_pen_fall, t_pen_rise, t_atv_fall, t_atv_rise, t_l1kp_rise, t_l2kp_rise;
  int t_fsclr_rise, t_fsclr_fall, t_fer_fall, t_fer_rise, t_ferp;
  logic pen_q, atv_q, l1kp_q, l2kp_q, fsclr_q, fer_q;

  stc_fast_card dut (.clk, .rst, .bc_i(bc),
    .ctc_pen_i(c_pen), .ctc_l1atv_i(c_atv), .ctc_l1kp_i(c_l1kp), .ctc_l2kp_i(c_l2kp),
    .ctc_fsclr_i(c_fsclr), .ctc_frsbu_i(c_frsbu), .ctc_fillbu_i(c_fillbu), .ctc_run_i(c_run),
    .det_trig_i(det), .test_trig_i(test), .l2_decider_i(dec), .fer_ext_i(fer_ext),
    .reg_we_i(we), .reg_addr_i(addr), .reg_wdata_i(wdata), .reg_rdata_o(rdata),
    .pen_o(pen), .l1atv_o(atv), .l1kp_o(l1kp), .l2kp_o(l2kp), .fsclr_o(fsclr),
    .frsbu_o(frsbu), .fillbu_o(fillbu), .run_o(run), .fer_o(fer), .fer_pulse_o(ferp),
    .l1_ff_o(l1ff), .clk_local_o(clkl));
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) ph <= '0;
    else     ph <= ph + 2'd1;
  end
  assign bc = (ph == 2'd3);

  // edge recorder, sampled just after each bunch-crossing edge
  always @(posedge clk) begin
    if (!rst && bc) begin
      #1;
      bcn++;
      if (!pen && pen_q) t_pen_fall = bcn;
      if (pen && !pen_q) t_pen_rise = bcn;
      if (!atv && atv_q) t_atv_fall = bcn;
      if (atv && !atv_q) t_atv_rise = bcn;
      if (l1kp && !l1kp_q) t_l1kp_rise = bcn;
      if (l2kp && !l2kp_q) t_l2kp_rise = bcn;
      if (fsclr && !fsclr_q) t_fsclr_rise = bcn;
      if (!fsclr && fsclr_q) t_fsclr_fall = bcn;
      if (!fer && fer_q) t_fer_fall = bcn;
      if (fer && !fer_q) t_fer_rise = bcn;
      if (ferp) t_ferp = bcn;
      pen_q = pen; atv_q = atv; l1kp_q = l1kp; l2kp_q = l2kp; fsclr_q = fsclr; fer_q = fer;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    we = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    addr = a; #1; d = rdata;
  endtask

  task automatic wait_bc(input int n);
    int s;
    s = bcn;
    while (bcn < s + n) @(posedge clk);
    #2;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  // wait for L1 Active, fire a local trigger, return the crossing of L1 Keep
  task automatic local_cycle(input int src, output int t_trig);
    int n;
    n = 0;
    while (!atv) begin wait_bc(1); n++; if (n > 400) break; end
    wait_bc(2);
    if (src < 2) det[src] = 1;
    else test = 1;
    @(posedge clk); #1; test = 0;
    wait_bc(1);
    det = '0;
    t_trig = bcn;
  endtask

  initial begin
    logic [31:0] d, d2;
    int t0, sc0, sc1;
    c_pen = 0; c_atv = 0; c_l1kp = 0; c_l2kp = 0; c_fsclr = 0; c_frsbu = 0; c_fillbu = 0; c_run = 0;
    det = 0; test = 0; dec = 0; fer_ext = 1; we = 0; addr = 0; wdata = 0;
    pen_q = 0; atv_q = 0; l1kp_q = 0; l2kp_q = 0; fsclr_q = 0; fer_q = 0;
    t_pen_fall = 0; t_pen_rise = 0; t_atv_fall = 0; t_atv_rise = 0; t_l1kp_rise = 0;
    t_l2kp_rise = 0; t_fsclr_rise = 0; t_fsclr_fall = 0; t_fer_fall = 0; t_fer_rise = 0; t_ferp = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // ---- modes 0 and 1: pass-through ----
    for (int m = 0; m < 2; m++) begin
      wr(4'd0, 32'(m));
      for (int i = 0; i < 40; i++) begin
        logic [7:0] r;
        r = 8'($urandom);
        {c_pen, c_atv, c_l1kp, c_l2kp, c_fsclr, c_frsbu, c_fillbu, c_run} = r;
        #1;
        checks++;
        if ({pen, atv, l1kp, l2kp, fsclr, frsbu, fillbu, run} != r) begin
          failures++; $display("mode %0d pass-through wrong", m);
        end
        @(posedge clk);
      end
    end
    {c_pen, c_atv, c_l1kp, c_l2kp, c_fsclr, c_frsbu, c_fillbu, c_run} = 8'b0000_0001;
    // ---- mode 3, forced L2 reject, detector trigger 0 ----
    wr(4'd1, 32'd10);                       // L2 decision 10 crossings after L1 Keep
    wr(4'd0, 32'(3 | (1 << 4) | (1 << 7) | (1 << 10)));
    local_cycle(0, t0);
    rd(4'd11, d);
    checks++; if (d[9] != 1'b1) begin failures++; $display("L1 flip-flop 0 not set: status %h", d); end
    wait_bc(200);
    expect_eq(t_l1kp_rise - t_pen_fall, 0, "L1 Keep vs PEn fall");
    expect_eq(t_atv_fall, t_pen_fall, "L1 Active drops with L1 Keep");
    expect_eq(t_fsclr_rise - t_l1kp_rise, 10, "L2 reject decision delay");
    expect_eq(t_fsclr_fall - t_fsclr_rise, 1, "Fast Clear length");
    expect_eq(t_pen_rise - t_fsclr_rise, 1, "PEn after Fast Clear");
    expect_eq(t_atv_rise - t_fsclr_rise, 145, "L1 Active after Fast Clear");
    checks++; if (l1kp || l2kp || l1ff != 0) begin failures++; $display("not cleared after reject"); end
    // ---- mode 3, forced L2 keep, FER flip-flop, detector trigger 1 scaled by 2 ----
    wr(4'd2, 32'd20);                       // FER back 20 crossings after L2 Keep
    wr(4'd4, 32'd2);
    wr(4'd0, 32'(3 | (1 << 4) | (1 << 6) | (1 << 11)));
    local_cycle(1, t0);                     // first trigger: scaled away
    wait_bc(3);
    checks++; if (l1kp) begin failures++; $display("down-scaler passed the first trigger"); end
    det[1] = 1; wait_bc(1); det[1] = 0;     // second: accepted
    wait_bc(200);
    expect_eq(t_l2kp_rise - t_l1kp_rise, 10, "L2 keep decision delay");
    expect_eq(t_fer_fall - t_l2kp_rise, 1, "FER drops after L2 Keep");
    expect_eq(t_fer_rise - t_fer_fall, 20, "FER delay");
    expect_eq(t_ferp - t_fer_rise, 1, "FER pulse");
    expect_eq(t_fsclr_rise - t_fer_rise, 1, "Fast Clear after FER");
    expect_eq(t_pen_rise - t_fsclr_rise, 1, "PEn after Fast Clear (keep)");
    expect_eq(t_atv_rise - t_fsclr_rise, 145, "L1 Active after Fast Clear (keep)");
    // ---- L2 decider input, external FER, test trigger on the bus ----
    fer_ext = 1;
    wr(4'd0, 32'(3 | (1 << 3) | (1 << 4) | (1 << 8) | (1 << 12)));
    dec = 1;
    while (!atv) wait_bc(1);
    wait_bc(2);
    wr(4'd0, 32'(3 | (1 << 3) | (1 << 4) | (1 << 8) | (1 << 9) | (1 << 12)));
    wait_bc(15);
    checks++; if (!l2kp) begin failures++; $display("decider keep not taken"); end
    fer_ext = 0; wait_bc(5);
    checks++; if (fer || !l2kp) begin failures++; $display("external FER not followed"); end
    fer_ext = 1; wait_bc(3);
    checks++; if (l2kp || fsclr_q) begin failures++; $display("no restart on external FER"); end
    // the external level is seen directly, Fast Clear starts in the same crossing
    expect_eq(t_fsclr_rise - t_fer_rise, 0, "Fast Clear after external FER");
    // decider says reject, test trigger from the input
    dec = 0;
    local_cycle(2, t0);
    wait_bc(15);
    expect_eq(t_fsclr_rise - t_l1kp_rise, 10, "decider reject");
    // ---- mode 2: L1 Keep from the CTC ----
    wr(4'd0, 32'(2 | (1 << 7)));
    while (!atv) wait_bc(1);
    c_l1kp = 1; wait_bc(1); c_l1kp = 0;
    wait_bc(15);
    expect_eq(t_fsclr_rise - t_l1kp_rise, 10, "mode 2 cycle");
    // ---- mode 4 selects the local oscillator ----
    wr(4'd0, 32'd4);
    #1 checks++; if (!clkl) begin failures++; $display("mode 4 oscillator select"); end
    wr(4'd0, 32'd3);
    #1 checks++; if (clkl) begin failures++; $display("oscillator select in mode 3"); end
    // ---- scalers ----
    rd(4'd7, d); sc0 = int'(d);
    wait_bc(50);
    rd(4'd7, d); sc1 = int'(d);
    expect_eq(sc1 - sc0, 50, "all-crossing scaler");
    c_frsbu = 1; wait_bc(1); c_frsbu = 0;
    rd(4'd6, d);
    wait_bc(7);
    rd(4'd5, d2);
    expect_eq(int'(d2), 7, "bunch scaler after First Bunch");
    c_frsbu = 1; wait_bc(1); c_frsbu = 0;
    rd(4'd6, d2);
    expect_eq(int'(d2 - d), 1, "revolution scaler");
    rd(4'd9, d);
    checks++; if (d == 0) begin failures++; $display("L1 Active scaler did not count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
