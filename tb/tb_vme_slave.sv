// tb_vme_slave -- VME slave controller against a behavioural VME master and
// a local target (64 words of memory answering after 1 to 3 clocks).
// Checks: single D32 writes and reads with every A24 modifier, address
// forwarding, a 10-word block read with the address stepping by 4, and that
// the card keeps off the bus (no DTACK*, no local request) for another base
// address, an A32 modifier or a D16 access.
module tb_vme_slave;
  import cip_pkg::*;
  logic clk = 0, rst = 1;
  logic vme_as_n, vme_write_n, vme_lword_n, vme_dtack_n, oe;
  logic [1:0] vme_ds_n;
  logic [5:0] vme_am;
  logic [23:1] vme_addr;
  logic [31:0] vme_wdata, vme_rdata, dout;
  lbus_req_t lreq;
  logic ack;
  logic [31:0] rdata;
  logic [31:0] mem [64];
  int checks = 0, failures = 0, nreq = 0;

  vme_slave dut (.clk, .rst, .base_i(8'h2A), .as_n_i(vme_as_n), .ds_n_i(vme_ds_n),
    .write_n_i(vme_write_n), .lword_n_i(vme_lword_n), .am_i(vme_am), .addr_i(vme_addr),
    .data_i(vme_wdata), .data_o(dout), .data_oe_o(oe), .dtack_n_o(vme_dtack_n),
    .lreq_o(lreq), .ack_i(ack), .rdata_i(rdata));
  assign vme_rdata = oe ? dout : 32'hFFFF_FFFF;   // pulled-up bus
  always #5 clk = ~clk;

  `include "vme_master_tasks.svh"

  // local target: memory with a random answer delay
  initial begin
    ack = 0; rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && lreq.req) begin
        logic [15:0] a;
        logic we;
        logic [31:0] wd;
        a = lreq.addr; we = lreq.we; wd = lreq.wdata;
        nreq++;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
        if (we) mem[a[7:2]] = wd;
        rdata = mem[a[7:2]];
        ack = 1;
        @(posedge clk); #1;
        ack = 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    logic [31:0] d, ref_mem [64];
    logic [31:0] blk [64];
    logic [5:0] ams [] = '{6'h39, 6'h3D, 6'h3B, 6'h3F};
    int n0;
    vme_idle();
    for (int i = 0; i < 64; i++) begin mem[i] = 32'(i); ref_mem[i] = 32'(i); end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    // single writes and reads
    for (int t = 0; t < 40; t++) begin
      int w;
      logic [31:0] v;
      w = $urandom_range(0, 63);
      v = $urandom;
      vme_cycle({8'h2A, 8'($urandom), 6'(w), 2'b00}, ams[t % 4], 1'b0, 1'b1, v, d, ok);
      ref_mem[w] = v;
      checks++;
      if (!ok) begin failures++; $display("write %0d: no DTACK", t); end
      w = $urandom_range(0, 63);
      vme_cycle({8'h2A, 8'h00, 6'(w), 2'b00}, ams[(t + 1) % 4], 1'b0, 1'b0, 32'h0, d, ok);
      checks++;
      if (!ok || d !== ref_mem[w]) begin failures++; $display("read word %0d: %h expected %h", w, d, ref_mem[w]); end
    end
    // block read of one event (10 words) from word 20
    vme_block_read({8'h2A, 8'h00, 6'd20, 2'b00}, 10, blk, ok);
    checks++;
    if (!ok) begin failures++; $display("block read: no DTACK"); end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (blk[i] !== ref_mem[20 + i]) begin failures++; $display("block word %0d wrong", i); end
    end
    // accesses that are not for this card
    n0 = nreq;
    vme_cycle({8'h2B, 16'h0010}, 6'h39, 1'b0, 1'b0, 32'h0, d, ok);
    checks++; if (ok) begin failures++; $display("answered another base"); end
    vme_cycle({8'h2A, 16'h0010}, 6'h09, 1'b0, 1'b1, 32'h1234, d, ok);
    checks++; if (ok) begin failures++; $display("answered an A32 modifier"); end
    vme_cycle({8'h2A, 16'h0010}, 6'h39, 1'b1, 1'b1, 32'h1234, d, ok);
    checks++; if (ok) begin failures++; $display("answered a D16 access"); end
    checks++; if (nreq != n0) begin failures++; $display("local requests for foreign accesses"); end
    // the card still works afterwards
    vme_read({8'h2A, 16'h0010}, d, ok);
    checks++; if (!ok || d !== ref_mem[4]) begin failures++; $display("read after foreign access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
