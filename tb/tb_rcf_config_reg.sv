// tb_rcf_config_reg: self-checking test of the container's configuration
// register. Checks the all-enabled reset value, random writes to ENABLE
// with read-back one clock after the read strobe, that writes to the
// read-only STATUS address change nothing, and that STATUS reads return the
// slot error inputs.
module tb_rcf_config_reg;
  localparam int N = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic cfg_wr = 1'b0, cfg_rd = 1'b0, cfg_addr = 1'b0;
  logic [N-1:0] cfg_wdata = '0, cfg_rdata, slot_error = '0, slot_enable;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  rcf_config_reg #(.N_SLOTS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rd(input logic a, output logic [N-1:0] d);
    cfg_rd = 1'b1; cfg_addr = a;
    @(posedge clk); #1;
    cfg_rd = 1'b0;
    d = cfg_rdata;
  endtask

  initial begin
    logic [N-1:0] d;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    model = '1;
    check(slot_enable == '1, "reset: all slots enabled");
    for (int i = 0; i < 200; i++) begin
      slot_error = N'($urandom);
      case ($urandom_range(2))
        0: begin
          cfg_wr = 1'b1; cfg_addr = $urandom_range(1); cfg_wdata = N'($urandom);
          if (cfg_addr == 1'b0) model = cfg_wdata;
          @(posedge clk); #1;
          cfg_wr = 1'b0;
          check(slot_enable == model, "enable follows writes");
        end
        1: begin rd(1'b0, d); check(d == model, "ENABLE read-back"); end
        2: begin rd(1'b1, d); check(d == slot_error, "STATUS read"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
