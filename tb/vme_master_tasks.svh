// vme_master_tasks.svh -- VME master (the trigger CPU's side of the bus) for
// testbenches. Included inside a testbench module that declares clk and the
// bus signals vme_as_n, vme_ds_n[1:0], vme_write_n, vme_lword_n, vme_am[5:0],
// vme_addr[23:1], vme_wdata[31:0] (master drives), vme_rdata[31:0] and
// vme_dtack_n (slave drives). Each task returns ok = 0 when DTACK* did not
// come within 200 clock cycles (a VME bus timeout).

task automatic vme_wait_dtack(input logic level, output bit ok);
  int n;
  n = 0;
  ok = 1;
  while (vme_dtack_n !== level) begin
    @(posedge clk);
    n++;
    if (n > 200) begin ok = 0; break; end
  end
endtask

task automatic vme_idle();
  vme_as_n = 1'b1; vme_ds_n = 2'b11; vme_write_n = 1'b1; vme_lword_n = 1'b0;
  vme_am = 6'h39; vme_addr = '0; vme_wdata = '0;
endtask

// One single-word cycle with a free choice of modifier and LWORD*.
task automatic vme_cycle(input logic [23:0] a, input logic [5:0] am, input logic lword_n,
                         input logic write, input logic [31:0] d_in,
                         output logic [31:0] d_out, output bit ok);
  bit ok2;
  vme_addr = a[23:1]; vme_am = am; vme_write_n = ~write; vme_lword_n = lword_n;
  vme_wdata = d_in;
  @(posedge clk); vme_as_n = 1'b0;
  repeat (2) @(posedge clk); vme_ds_n = 2'b00;
  vme_wait_dtack(1'b0, ok);
  d_out = vme_rdata;
  @(posedge clk); vme_ds_n = 2'b11;
  vme_wait_dtack(1'b1, ok2);
  vme_as_n = 1'b1; vme_write_n = 1'b1;
  repeat (3) @(posedge clk);
  ok = ok & ok2;
endtask

task automatic vme_write(input logic [23:0] a, input logic [31:0] d, output bit ok);
  logic [31:0] dummy;
  vme_cycle(a, 6'h39, 1'b0, 1'b1, d, dummy, ok);
endtask

task automatic vme_read(input logic [23:0] a, output logic [31:0] d, output bit ok);
  vme_cycle(a, 6'h39, 1'b0, 1'b0, 32'h0, d, ok);
endtask

// Block read of n consecutive longwords starting at a (AS* held low).
task automatic vme_block_read(input logic [23:0] a, input int n,
                              output logic [31:0] d [64], output bit ok);
  bit okk;
  ok = 1;
  vme_addr = a[23:1]; vme_am = 6'h3B; vme_write_n = 1'b1; vme_lword_n = 1'b0;
  @(posedge clk); vme_as_n = 1'b0;
  repeat (2) @(posedge clk);
  for (int i = 0; i < n; i++) begin
    vme_ds_n = 2'b00;
    vme_wait_dtack(1'b0, okk); ok &= okk;
    d[i] = vme_rdata;
    @(posedge clk); vme_ds_n = 2'b11;
    vme_wait_dtack(1'b1, okk); ok &= okk;
    @(posedge clk);
  end
  vme_as_n = 1'b1;
  repeat (3) @(posedge clk);
endtask
