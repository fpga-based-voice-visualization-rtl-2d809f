// ac97_cmd_tb: self-checking test of the codec configuration state machine.
//
// Pulses `ready` once per simulated frame (every 256 BIT_CLK cycles) and
// checks that the machine steps through its twelve register writes in
// order, one per pulse, that it holds between pulses, that the PCM-out
// volume, record gain and DAC-rate writes sit in states 4, 5 and 6, that it
// stops in the last state with `done` set, and that the volume input is
// written as attenuation 31 - volume to both channels.
`timescale 1ns/1ps
module ac97_cmd_tb;
  import vv_pkg::*;

  logic bit_clk = 1'b0;
  always #40 bit_clk = ~bit_clk;

  logic       rst_n, ready;
  logic [4:0] volume;
  ac97_cmd_t  cmd;
  logic [3:0] state;
  logic       done;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ac97_cmd dut (.bit_clk, .rst_n, .ready, .volume, .cmd, .state, .done);

  // expected register writes, from the AC'97 register map
  logic [7:0]  exp_addr [12];
  logic [15:0] exp_data [12];

  initial begin
    volume = 5'b10101;  // 21 -> attenuation 10
    exp_addr = '{8'h02, 8'h04, 8'h0A, 8'h0E, 8'h18, 8'h1C, 8'h2C, 8'h32, 8'h1A, 8'h20, 8'h04, 8'h02};
    exp_data = '{16'h8000, 16'h8000, 16'h0000, 16'h0008, 16'h0808, 16'h0F0F, 16'hBB80, 16'hBB80,
                 16'h0000, 16'h0000, 16'h0A0A, 16'h0A0A};
    ready = 1'b0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge bit_clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 12; s++) begin
      // hold for a frame without ready: command must not move
      repeat (255) begin
        @(posedge bit_clk);
        #1;
        if (cmd.addr != exp_addr[s] || cmd.data != exp_data[s]) begin
          check(1'b0, $sformatf("state %0d: %h/%h exp %h/%h", s, cmd.addr, cmd.data, exp_addr[s], exp_data[s]));
          break;
        end
      end
      check(cmd.addr == exp_addr[s] && cmd.data == exp_data[s] && state == 4'(s),
            $sformatf("write %0d: %h/%h exp %h/%h", s, cmd.addr, cmd.data, exp_addr[s], exp_data[s]));
      check(done == (s == 11), $sformatf("done in state %0d", s));
      ready = 1'b1;
      @(posedge bit_clk);
      #1 ready = 1'b0;
    end
    // stays in the last state
    check(state == 4'd11 && done, "stays in last state");
    volume = 5'd31;
    #1;
    check(cmd.addr == 8'h02 && cmd.data == 16'h0000, "full volume is attenuation 0");
    volume = 5'd0;
    #1;
    check(cmd.data == 16'h1F1F, "zero volume is attenuation 31");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge bit_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
