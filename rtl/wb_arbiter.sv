// Wishbone arbiter: lets the core's instruction and data ports share one bus.
//
// When the bus is free the instruction port wins if it requests, otherwise
// the data port gets it. The grant is then held until the slave answers the
// cycle with ack or err, after which arbitration starts again. The data port
// cannot starve: the fetch stage stops requesting once its two-entry buffer
// is full, which happens while a data access holds up the pipeline, and the
// instructions fetched meanwhile close up behind the waiting access. The granted
// master is connected straight through, so arbitration adds no cycle. The
// losing master sees no ack and keeps waiting.
//
// The original names an arbiter between the core's instruction and data ports.
// Its priority rule and the held grant are this design's own.
module wb_arbiter (
  input  logic clk,
  input  logic rst,
  wb_if.slave  ibus,
  wb_if.slave  dbus,
  wb_if.master bus
);
  logic owner_q, busy_q, sel;  // sel: 1 = data port

  always_comb begin
    sel = busy_q ? owner_q : !ibus.cyc;
    if (sel) begin
      bus.adr   = dbus.adr;
      bus.dat_w = dbus.dat_w;
      bus.sel   = dbus.sel;
      bus.cyc   = dbus.cyc;
      bus.stb   = dbus.stb;
      bus.we    = dbus.we;
    end else begin
      bus.adr   = ibus.adr;
      bus.dat_w = ibus.dat_w;
      bus.sel   = ibus.sel;
      bus.cyc   = ibus.cyc;
      bus.stb   = ibus.stb;
      bus.we    = ibus.we;
    end
    ibus.dat_r = bus.dat_r;
    dbus.dat_r = bus.dat_r;
    ibus.ack   = !sel && bus.ack;
    ibus.err   = !sel && bus.err;
    dbus.ack   =  sel && bus.ack;
    dbus.err   =  sel && bus.err;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      owner_q <= 1'b0;
      busy_q  <= 1'b0;
    end else begin
      owner_q <= sel;
      busy_q  <= bus.cyc && !(bus.ack || bus.err);
    end
  end
endmodule
