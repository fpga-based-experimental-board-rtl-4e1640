// panel_bus_scanner: shares one 8-bit bus between the control-panel switch
// and LED groups.
//
// Each group of eight panel signals sits behind its own octal bus transceiver
// (74HC245: active-low output enable OE_n, direction DIR, A side on the FPGA
// bus, B side on the panel). The scanner enables one transceiver at a time,
// NIN switch groups first (DIR = B->A, the FPGA samples the bus) and then
// NOUT LED groups (DIR = A->B, the FPGA drives the bus). Each slot lasts SLOT
// clocks: in the first clock no transceiver is enabled and the FPGA does not
// drive, so two drivers never meet on the bus; a switch group is sampled in
// the slot's last clock. LED groups are refreshed once per scan, so the LEDs
// are time multiplexed. The shared bus and the 74HC245 are the document's;
// the slot order, the slot length and the turnaround gap are this design's.
//
// Interface: `sw[g]` holds the last sample of switch group g; `leds[g]` is
// driven onto the bus during LED slot g; `bus_oe` enables the FPGA's bus
// drivers; `scan_done` pulses after every full scan and `sw_valid` rises
// after the first.
module panel_bus_scanner #(
  parameter int unsigned NIN  = 3,
  parameter int unsigned NOUT = 2,
  parameter int unsigned SLOT = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 bus_i,
  output logic [7:0]                 bus_o,
  output logic                       bus_oe,
  output logic [NIN+NOUT-1:0]        oe_n,
  output logic                       dir,
  input  logic [NOUT-1:0][7:0]       leds,
  output logic [NIN-1:0][7:0]        sw,
  output logic                       sw_valid,
  output logic                       scan_done
);

  localparam int unsigned NG = NIN + NOUT;
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned SW = (SLOT > 1) ? $clog2(SLOT) : 1;

  logic [GW-1:0] grp;
  logic [SW-1:0] tick;
  logic          is_in;
  logic          gap;

  assign is_in = (grp < GW'(NIN));
  assign gap   = (tick == '0);

  always_comb begin
    oe_n   = '1;
    bus_o  = '0;
    bus_oe = 1'b0;
    dir    = is_in ? 1'b0 : 1'b1;
    if (!gap) begin
      oe_n[grp] = 1'b0;
      if (!is_in) begin
        bus_oe = 1'b1;
        bus_o  = leds[grp - GW'(NIN)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp       <= '0;
      tick      <= '0;
      sw        <= '0;
      sw_valid  <= 1'b0;
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      if (tick == SW'(SLOT - 1)) begin
        tick <= '0;
        if (is_in) sw[grp] <= bus_i;
        if (grp == GW'(NG - 1)) begin
          grp       <= '0;
          scan_done <= 1'b1;
          sw_valid  <= 1'b1;
        end else begin
          grp <= grp + 1'b1;
        end
      end else begin
        tick <= tick + 1'b1;
      end
    end
  end

  initial assert (SLOT >= 2) else $error("SLOT must leave room for the turnaround gap");

endmodule
