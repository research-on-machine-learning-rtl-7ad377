// tb_cordic_aux_regs: AXI4-Lite register test. Checks reset values, write and
// read-back of every register, byte strobes, that writes to one register leave
// the others alone, unmapped addresses, held responses under a slow master,
// and the register outputs seen by the CORDIC cell.
module tb_cordic_aux_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [31:0] input_a, scale_factor;
  logic [1:0]  map_in, map_out, map_scale;

  cordic_aux_regs dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .input_a, .scale_factor, .mapping_input(map_in), .mapping_output(map_out), .mapping_scale(map_scale));

  task automatic chk(input bit ok, input string tag);
    checks++;
    if (!ok) begin failures++; $display("%s failed", tag); end
  endtask

  task automatic write(input logic [4:0] a, input logic [31:0] d, input logic [3:0] s, input int bdelay);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1; bready = 0;
    do @(negedge clk); while (!(awready && wready));
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0;
    repeat (bdelay) begin
      @(posedge clk); #1;
      chk(bvalid, "bvalid held");
    end
    bready = 1;
    do @(negedge clk); while (!bvalid);
    chk(bresp == 2'b00, "bresp");
    @(posedge clk); #1;
    bready = 0;
  endtask

  task automatic read(input logic [4:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1; rready = 1;
    do @(negedge clk); while (!arready);
    @(posedge clk); #1;
    arvalid = 0;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    chk(rresp == 2'b00, "rresp");
    @(posedge clk); #1;
    rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    // reset values
    read(5'h00, d); chk(d == 32'h0, "reset input_a");
    read(5'h04, d); chk(d == 32'h3f80_0000, "reset scale");
    read(5'h08, d); chk(d == 32'h0, "reset map_in");
    chk(map_out == 0 && map_scale == 0, "reset maps");
    // full writes
    write(5'h00, 32'h3f1b_74ee, 4'hf, 0);  read(5'h00, d); chk(d == 32'h3f1b_74ee && input_a == d, "input_a");
    write(5'h04, 32'h3f00_0000, 4'hf, 3);  read(5'h04, d); chk(d == 32'h3f00_0000 && scale_factor == d, "scale");
    write(5'h08, 32'h0000_0002, 4'hf, 1);  read(5'h08, d); chk(d == 32'h2 && map_in == 2, "map_in");
    write(5'h0c, 32'hffff_ffff, 4'hf, 0);  read(5'h0c, d); chk(d == 32'h3 && map_out == 3, "map_out");
    write(5'h10, 32'h0000_0001, 4'hf, 2);  read(5'h10, d); chk(d == 32'h1 && map_scale == 1, "map_scale");
    // byte strobes
    write(5'h00, 32'haabb_ccdd, 4'b0101, 0); read(5'h00, d); chk(d == 32'h3fbb_74dd, "strobe");
    write(5'h08, 32'h0000_0001, 4'b0000, 0); read(5'h08, d); chk(d == 32'h2, "no strobe");
    // unmapped address
    write(5'h14, 32'h1234_5678, 4'hf, 0);  read(5'h14, d); chk(d == 32'h0, "unmapped");
    chk(input_a == 32'h3fbb_74dd && scale_factor == 32'h3f00_0000 && map_in == 2 && map_out == 3 && map_scale == 1,
        "others untouched");
    // random write/read-back
    for (int i = 0; i < 50; i++) begin
      logic [31:0] v;
      v = $urandom;
      write(5'h04, v, 4'hf, $urandom_range(0, 2));
      read(5'h04, d); chk(d == v && scale_factor == v, "random scale");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
