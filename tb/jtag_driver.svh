// jtag_driver.svh: JTAG debugger tasks shared by testbenches that talk to
// jtag_dbg_bridge. The including module must declare clk, tck, tms, tdi and
// tdo. One TCK period is 2 * JTAG_HALF clock cycles.
localparam int JTAG_HALF = 5;

task automatic jtag_clock(logic tms_v, logic tdi_v, output logic tdo_v);
  tms = tms_v;
  tdi = tdi_v;
  repeat (JTAG_HALF) @(negedge clk);
  tdo_v = tdo;
  tck = 1;
  repeat (JTAG_HALF) @(negedge clk);
  tck = 0;
endtask

task automatic jtag_reset();
  logic d;
  repeat (6) jtag_clock(1, 0, d);
  jtag_clock(0, 0, d);           // Run-Test/Idle
endtask

task automatic jtag_ir(logic [3:0] ir, output logic [3:0] out);
  logic d;
  jtag_clock(1, 0, d);           // Select-DR
  jtag_clock(1, 0, d);           // Select-IR
  jtag_clock(0, 0, d);           // Capture-IR
  jtag_clock(0, 0, d);           // Shift-IR
  for (int i = 0; i < 4; i++) jtag_clock(i == 3, ir[i], out[i]);
  jtag_clock(1, 0, d);           // Update-IR
  jtag_clock(0, 0, d);           // Run-Test/Idle
endtask

task automatic jtag_dr(int len, logic [65:0] din, output logic [65:0] dout);
  logic d;
  dout = '0;
  jtag_clock(1, 0, d);           // Select-DR
  jtag_clock(0, 0, d);           // Capture-DR
  jtag_clock(0, 0, d);           // Shift-DR
  for (int i = 0; i < len; i++) jtag_clock(i == len - 1, din[i], dout[i]);
  jtag_clock(1, 0, d);           // Update-DR
  jtag_clock(0, 0, d);           // Run-Test/Idle
endtask

// ACCESS instruction must be selected
task automatic jtag_write(logic [31:0] addr, logic [31:0] data);
  logic [65:0] o;
  jtag_dr(66, {1'b1, 1'b1, addr, data}, o);
  repeat (4) jtag_clock(0, 0, o[0]);
endtask

task automatic jtag_read(logic [31:0] addr, output logic [31:0] data, output logic done);
  logic [65:0] o;
  jtag_dr(66, {1'b1, 1'b0, addr, 32'h0}, o);
  repeat (4) jtag_clock(0, 0, o[0]);
  jtag_dr(66, '0, o);
  data = o[31:0];
  done = o[32];
endtask
