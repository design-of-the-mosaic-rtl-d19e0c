// mosaic_ports: the four input ports, four output ports and port condition.
//
// A port is named by the fixed field I<6:4> of the instruction register:
// I<6> is the direction (1 = input port, 0 = output port) and I<5:4> the
// port number. The port condition sent to the controller is 0 when the
// selected port is ready for a bus operation: an output port with room for a
// word, or an input port holding a word. The controller may then load the
// selected output port from the bus (=>Pt), let the selected input port drive
// the bus (Pt=>), or advance it (remove its word). Loads and advances are
// ignored when the direction bit names the other kind of port, as the
// decoding in the document's port circuits does.
// Each port has its own link; the links' levels come in as in_link/out_link
// and the ports' clamps go out as in_clamp/out_clamp (1 = pull the wire low).
module mosaic_ports #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NPORT = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       sel,        // I<6:4>
  input  logic             load,       // =>Pt
  input  logic             advance,
  input  logic [WIDTH-1:0] bus,
  output logic [WIDTH-1:0] pt_data,    // Pt=> value
  output logic             portc,      // 0 when the selected port is ready
  input  logic [NPORT-1:0] in_link,
  output logic [NPORT-1:0] in_clamp,
  input  logic [NPORT-1:0] out_link,
  output logic [NPORT-1:0] out_clamp
);
  logic [NPORT-1:0] in_full, out_empty;
  logic [WIDTH-1:0] in_data [NPORT];
  logic [1:0]       pt;
  logic             dir_in;

  assign pt     = sel[1:0];
  assign dir_in = sel[2];

  for (genvar n = 0; n < NPORT; n++) begin : g_port
    mosaic_outport #(.WIDTH(WIDTH)) u_out (
      .clk, .rst,
      .load  (load && !dir_in && pt == n),
      .data  (bus),
      .link  (out_link[n]),
      .clamp (out_clamp[n]),
      .empty (out_empty[n])
    );
    mosaic_inport #(.WIDTH(WIDTH)) u_in (
      .clk, .rst,
      .advance (advance && dir_in && pt == n),
      .link    (in_link[n]),
      .data    (in_data[n]),
      .full    (in_full[n]),
      .clamp   (in_clamp[n])
    );
  end

  assign pt_data = in_data[pt];
  assign portc   = dir_in ? !in_full[pt] : !out_empty[pt];
endmodule
